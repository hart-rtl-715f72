// tb_and_part: exhaustive check of the eight-input AND gate part.
module tb_and_part;
  int checks = 0, failures = 0;
  logic [7:0] in;
  logic       all_one;

  and_part #(.W(8)) dut (.in(in), .all_one(all_one));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      in = v[7:0];
      #1;
      checks++;
      if (all_one !== (v == 255)) begin
        failures++;
        $display("in=%b all_one=%b", in, all_one);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
