// tb_latch_part: check of the latch part.
// Random set patterns are applied with random apply and clear; a reference
// copy accumulates the OR of the applied patterns and is zeroed by clear
// (clear wins over a simultaneous apply).  Outputs are compared every cycle.
module tb_latch_part;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, clr = 0, apply = 0;
  logic [7:0] set = '0, r, ref_r;

  latch_part #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .apply(apply), .set(set), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_r = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (r !== 8'h00) begin failures++; $display("not zero after reset: %b", r); end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      set   = 8'($urandom) & 8'($urandom);
      apply = ($urandom % 4) != 0;
      clr   = ($urandom % 16) == 0;
      @(posedge clk);
      if (clr)        ref_r = '0;
      else if (apply) ref_r = ref_r | set;
      #1;
      checks++;
      if (r !== ref_r) begin failures++; $display("cycle %0d r=%b expected %b", k, r, ref_r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
