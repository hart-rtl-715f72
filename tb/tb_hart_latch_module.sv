// tb_hart_latch_module: one latch module.
// Random select, x6 part and decoded lines are applied with random apply and
// clear; a reference copy sets latch 4a+v when sel, x6^a and q[v] are all high.
// Latches and the module's AND output are compared every cycle.
module tb_hart_latch_module;
  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, clr = 0, apply = 0, sel = 0;
  logic [1:0] p_hi = '0;
  logic [3:0] q = '0;
  logic [7:0] r, ref_r;
  logic       all_one;
  int         n_full = 0;

  hart_latch_module dut (.clk(clk), .rst_n(rst_n), .clr(clr), .apply(apply), .sel(sel),
                         .p_hi(p_hi), .q(q), .r(r), .all_one(all_one));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_r = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      sel   = ($urandom % 4) != 0;
      p_hi  = 2'($urandom);
      q     = 4'($urandom);
      apply = ($urandom % 3) != 0;
      clr   = ($urandom % 24) == 0;
      @(posedge clk);
      if (clr) ref_r = '0;
      else if (apply && sel)
        for (int l = 0; l < 8; l++) if (p_hi[l / 4] && q[l % 4]) ref_r[l] = 1'b1;
      #1;
      checks++;
      if (r !== ref_r || all_one !== (ref_r == 8'hFF)) begin
        failures++;
        $display("cycle %0d r=%b all_one=%b expected %b", k, r, all_one, ref_r);
      end
      if (ref_r == 8'hFF) n_full++;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("module never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
