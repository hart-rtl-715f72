// tb_hart_ctrl: exhaustive check of the control module's decoding.
// 8-input mode: line 2b+c must equal x7^b AND x8^c.  6-in/4-out mode: line v
// must equal bit v of the four-valued output part {p8, p7}.
module tb_hart_ctrl;
  import hart_pkg::*;
  int checks = 0, failures = 0;
  hart_mode_e mode;
  logic [1:0] p7, p8;
  logic [3:0] q;

  hart_ctrl dut (.mode(mode), .p7(p7), .p8(p8), .q(q));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int md = 0; md < 2; md++) begin
      for (int v = 0; v < 16; v++) begin
        logic [3:0] e;
        mode = hart_mode_e'(md);
        {p8, p7} = v[3:0];
        if (md == 0) begin
          // x7 = 0 needs p7[0], x7 = 1 needs p7[1]; same for x8
          e[0] = p7[0] & p8[0];
          e[1] = p7[0] & p8[1];
          e[2] = p7[1] & p8[0];
          e[3] = p7[1] & p8[1];
        end else begin
          e = v[3:0];
        end
        #1;
        checks++;
        if (q !== e) begin failures++; $display("mode %0d bits %b: q=%b expected %b", md, v[3:0], q, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
