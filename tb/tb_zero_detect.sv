// tb_zero_detect: check of the zero-detection part.
// First the nine rows of the zero-detection truth table (ones from y0 up to
// the first zero), then all 256 latch patterns against a scan for the lowest
// zero latch.
module tb_zero_detect;
  int checks = 0, failures = 0;
  logic [7:0] y;
  logic       t;
  logic [2:0] code;

  zero_detect #(.N(3)) dut (.y(y), .t(t), .code(code));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // table rows: k leading ones (y0..y(k-1)), then zeros
    for (int k = 0; k <= 8; k++) begin
      y = 8'((1 << k) - 1);
      #1;
      checks++;
      if (k == 8) begin
        if (t !== 1'b1 || code !== 3'd0) begin failures++; $display("row all ones: t=%b code=%0d", t, code); end
      end else if (t !== 1'b0 || code !== 3'(k)) begin
        failures++;
        $display("row %0d: t=%b code=%0d", k, t, code);
      end
    end
    for (int v = 0; v < 256; v++) begin
      int first;
      y = v[7:0];
      first = -1;
      for (int i = 7; i >= 0; i--) if (!v[i]) first = i;
      #1;
      checks++;
      if (t !== (first < 0) || code !== ((first < 0) ? 3'd0 : 3'(first))) begin
        failures++;
        $display("y=%b t=%b code=%0d expected first zero %0d", y, t, code, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
