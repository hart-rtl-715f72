// tb_hart8: the 256-latch checker driven through its host port.
// A reference truth table is kept in the testbench.  Checked: latch contents
// and the tautology bit after random expressions in both configurations; the
// mask (implication c <= F, compared with the truth table of F over the
// minterms of c); the benchmark expressions S(n) = x1 + ... + xn and
// T(n) = S(n) + ~x1...~xn for n = 6, 7, 8, where unused variables are sent as
// "11"; and the latency: a cube written at one rising edge is in the latches
// and the status register after the next.
module tb_hart8;
  import hart_pkg::*;
  int checks = 0, failures = 0;
  logic         clk = 0, rst_n = 0, wr = 0;
  logic [2:0]   addr = '0;
  logic [7:0]   wdata = '0, rdata;
  logic         taut;
  logic [255:0] latches;

  hart8 dut (.clk(clk), .rst_n(rst_n), .addr(addr), .wr(wr), .wdata(wdata), .rdata(rdata),
             .taut(taut), .latches(latches));

  always #5 clk = ~clk;

  bit           mode6;      // reference configuration
  logic [255:0] tt;         // reference truth table

  // is minterm m (x1 = bit 7) inside the 16-bit positional cube c?
  function automatic bit member(logic [15:0] c, int m, bit m6);
    int nbin = m6 ? 6 : 8;
    for (int i = 0; i < nbin; i++) if (!c[2*i + m[7-i]]) return 0;
    if (m6 && !c[12 + m[1:0]]) return 0;
    return 1;
  endfunction

  task automatic write(logic [2:0] a, logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic send_cube(logic [15:0] c);
    write(REG_CUBE0, c[7:0]);
    write(REG_CUBE1, c[15:8]);
    for (int m = 0; m < 256; m++) if (member(c, m, mode6)) tt[m] = 1'b1;
  endtask

  task automatic command(bit clear, bit m6, bit mask_en, bit mask_load);
    write(REG_CMD, {4'b0, mask_load, mask_en, m6, clear});
    mode6 = m6;
    if (clear) tt = '0;
  endtask

  task automatic settle();
    @(negedge clk);
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] rand_cube(int p_full, bit m6);
    logic [15:0] c;
    for (int i = 0; i < 8; i++) c[2*i +: 2] = ($urandom % 100 < p_full) ? 2'b11 : (($urandom % 2) ? 2'b01 : 2'b10);
    if (m6) c[15:12] = 4'($urandom);
    return c;
  endfunction

  function automatic logic [15:0] s_term(int n, int j);   // x_j alone, others free
    logic [15:0] c = '1;
    c[2*j +: 2] = 2'b10;     // x_j^1 only
    return c;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode6 = 0; tt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(latches == '0 && !taut, "reset");

    // latency: high-byte write sampled at edge E; latches set at E+1
    command(1, 0, 0, 0);
    write(REG_CUBE0, 8'hFF);
    @(negedge clk); addr = REG_CUBE1; wdata = 8'hFF; wr = 1;
    @(posedge clk); #1 wr = 0;
    chk(latches == '0, "not yet applied right after the write edge");
    @(posedge clk); #1;
    chk(&latches && taut, "universal cube applied one edge later");
    addr = REG_STATUS; #1;
    chk(rdata[0] == 1'b1, "status shows tautology");

    // random expressions, both configurations
    for (int e = 0; e < 120; e++) begin
      automatic bit m6 = (e % 2);
      automatic int nc = 1 + $urandom % 40;
      automatic int pf = 40 + $urandom % 50;
      command(1, m6, 0, 0);
      for (int k = 0; k < nc; k++) send_cube(rand_cube(pf, m6));
      settle();
      chk(latches === tt, $sformatf("expr %0d mode6=%0d latches", e, m6));
      chk(taut === &tt, $sformatf("expr %0d taut", e));
    end

    // mask: c <= F by restriction, both configurations
    for (int e = 0; e < 80; e++) begin
      automatic bit m6 = (e % 2);
      logic [15:0] c, fc [$];
      bit expect_in;
      automatic int nc = 1 + $urandom % 24;
      c = rand_cube(60, m6);
      if (m6 && c[15:12] == 4'b0) c[15:12] = 4'b0001;
      command(1, m6, 0, 0);
      write(REG_CUBE0, c[7:0]);          // low byte only: no apply
      @(negedge clk); addr = REG_CUBE1; wdata = c[15:8]; wr = 1;
      @(negedge clk); wr = 0;            // this applies c unmasked...
      command(1, m6, 1, 1);              // ...so clear, then load it as mask and enable
      fc = {};
      for (int k = 0; k < nc; k++) begin
        automatic logic [15:0] d = rand_cube(70, m6);
        fc.push_back(d);
        send_cube(d);
      end
      settle();
      // reference: every minterm of c covered by F
      expect_in = 1;
      for (int m = 0; m < 256; m++) begin
        automatic bit cov = 0;
        foreach (fc[k]) if (member(fc[k], m, m6)) cov = 1;
        if (member(c, m, m6) && !cov) expect_in = 0;
      end
      chk(taut === expect_in, $sformatf("mask %0d: c=%h taut=%b expected %b", e, c, taut, expect_in));
      command(1, m6, 0, 0);
    end

    // benchmark expressions S(n) and T(n)
    for (int n = 6; n <= 8; n++) begin
      automatic logic [15:0] all0 = '1;
      command(1, 0, 0, 0);
      for (int j = 0; j < n; j++) send_cube(s_term(n, j));
      settle();
      chk(!taut && latches === tt, $sformatf("S(%0d) is not a tautology", n));
      for (int j = 0; j < n; j++) all0[2*j +: 2] = 2'b01;
      send_cube(all0);
      settle();
      chk(taut && latches === tt, $sformatf("T(%0d) is a tautology", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
