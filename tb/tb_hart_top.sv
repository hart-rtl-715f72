// tb_hart_top: end-to-end test of the whole design at its default sizes.
// The 256-latch checker is driven through its host port as a host program
// would: clear, send the cubes of an expression, read the status register.
// The expressions are the benchmark families S(n) = x1 + ... + xn (not a
// tautology) and T(n) = S(n) + ~x1...~xn (a tautology) for n = 6, 7, 8,
// random eight-input expressions, random six-input four-output expressions,
// and implication checks c <= F through the mask, including cubes that the
// mask drops.  The three-variable checker replays the worked example and the
// test generator finds tests of random three-variable expressions.
// Every result is compared with a truth table kept in the testbench, and each
// mechanism (clear, tautology, non-tautology, both configurations, mode
// switch, mask hit and miss, dropped cube, test found, no test) must occur.
module tb_hart_top;
  import hart_pkg::*;
  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 0;
  logic [2:0]      h8_addr = '0;
  logic            h8_wr = 0;
  logic [7:0]      h8_wdata = '0, h8_rdata;
  logic            h8_taut;
  logic [255:0]    h8_latches;
  logic            h3_clr = 0, h3_apply = 0, h3_taut;
  logic [2:0][1:0] h3_cube = '0;
  logic [7:0]      h3_r;
  logic            tg_clr = 0, tg_apply = 0, tg_t;
  logic [2:0][1:0] tg_cube = '0;
  logic [7:0]      tg_y;
  logic [2:0]      tg_code;

  hart_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_clear, n_taut, n_nontaut, n_mode8, n_mode6, n_switch, n_mask_in, n_mask_out, n_drop;
  int n_ex41, n_test, n_notest;
  bit h8_done = 0, small_done = 0;

  bit           mode6;
  logic [255:0] tt;

  function automatic bit member(logic [15:0] c, int m, bit m6);
    int nbin = m6 ? 6 : 8;
    for (int i = 0; i < nbin; i++) if (!c[2*i + m[7-i]]) return 0;
    if (m6 && !c[12 + 32'(m[1:0])]) return 0;
    return 1;
  endfunction

  function automatic bit meets(logic [15:0] a, logic [15:0] b, bit m6);
    for (int m = 0; m < 256; m++) if (member(a, m, m6) && member(b, m, m6)) return 1;
    return 0;
  endfunction

  task automatic write(logic [2:0] a, logic [7:0] d);
    @(negedge clk); h8_addr = a; h8_wdata = d; h8_wr = 1;
    @(negedge clk); h8_wr = 0;
  endtask

  task automatic send_cube(logic [15:0] c);
    write(REG_CUBE0, c[7:0]);
    write(REG_CUBE1, c[15:8]);
    for (int m = 0; m < 256; m++) if (member(c, m, mode6)) tt[m] = 1'b1;
  endtask

  task automatic command(bit clear, bit m6, bit mask_en, bit mask_load);
    if (m6 != mode6) n_switch++;
    write(REG_CMD, {4'b0, mask_load, mask_en, m6, clear});
    mode6 = m6;
    if (clear) begin tt = '0; n_clear++; end
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // read the status register as the host does and compare with the reference
  task automatic check_status(string what);
    @(negedge clk);
    h8_addr = REG_STATUS;
    #1;
    chk(h8_latches === tt, {what, ": latches"});
    chk(h8_rdata[0] === &tt && h8_taut === &tt, {what, ": tautology bit"});
    chk(h8_rdata[1] === mode6, {what, ": mode bit"});
    if (&tt) n_taut++; else n_nontaut++;
    if (mode6) n_mode6++; else n_mode8++;
  endtask

  function automatic logic [15:0] rand_cube(int p_full, bit m6);
    logic [15:0] c;
    for (int i = 0; i < 8; i++) c[2*i +: 2] = ($urandom % 100 < p_full) ? 2'b11 : (($urandom % 2) ? 2'b01 : 2'b10);
    if (m6) c[15:12] = 4'($urandom);
    return c;
  endfunction

  function automatic bit covers3(logic [2:0][1:0] c, int m);
    for (int i = 0; i < 3; i++) if (!c[i][m[2-i]]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 256-latch checker ----------------
  initial begin : h8_test
    {n_clear, n_taut, n_nontaut, n_mode8, n_mode6, n_switch, n_mask_in, n_mask_out, n_drop} = '0;
    {n_ex41, n_test, n_notest} = '0;
    mode6 = 0; tt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // S(n) and T(n), n = 6..8; unused variables are sent as don't-care parts
    for (int n = 6; n <= 8; n++) begin
      logic [15:0] c;
      command(1, 0, 0, 0);
      for (int j = 0; j < n; j++) begin
        c = '1;
        c[2*j +: 2] = 2'b10;
        send_cube(c);
      end
      check_status($sformatf("S(%0d)", n));
      chk(!h8_taut, "S(n) must not be a tautology");
      c = '1;
      for (int j = 0; j < n; j++) c[2*j +: 2] = 2'b01;
      send_cube(c);
      check_status($sformatf("T(%0d)", n));
      chk(h8_taut, "T(n) must be a tautology");
    end

    // random expressions, alternating configurations
    for (int e = 0; e < 60; e++) begin
      automatic bit m6 = 1'(e % 2);
      automatic int nc = 4 + $urandom % 40;
      automatic int pf = 50 + $urandom % 45;
      command(1, m6, 0, 0);
      for (int k = 0; k < nc; k++) send_cube(rand_cube(pf, m6));
      check_status($sformatf("random expression %0d (mode6=%0d)", e, m6));
    end

    // implication c <= F through the mask
    for (int e = 0; e < 60; e++) begin
      automatic bit m6 = 1'(e % 2);
      automatic int nc = 2 + $urandom % 30;
      logic [15:0] c, fc [$];
      bit expect_in;
      c = rand_cube(65, m6);
      if (m6 && c[15:12] == 4'b0) c[15:12] = 4'b0011;
      command(1, m6, 0, 0);
      send_cube(c);                         // cube register now holds c
      command(1, m6, 1, 1);                 // clear, load c as mask, enable mask
      fc = {};
      for (int k = 0; k < nc; k++) begin
        logic [15:0] d;
        d = rand_cube(75, m6);
        if (!meets(c, d, m6)) n_drop++;
        fc.push_back(d);
        write(REG_CUBE0, d[7:0]);
        write(REG_CUBE1, d[15:8]);
      end
      @(negedge clk);
      h8_addr = REG_STATUS;
      #1;
      expect_in = 1;
      for (int m = 0; m < 256; m++) begin
        bit cov;
        cov = 0;
        foreach (fc[k]) if (member(fc[k], m, m6)) cov = 1;
        if (member(c, m, m6) && !cov) expect_in = 0;
      end
      if (expect_in) n_mask_in++; else n_mask_out++;
      chk(h8_rdata[0] === expect_in, $sformatf("mask %0d: c=%h says %b expected %b", e, c, h8_rdata[0], expect_in));
      chk(h8_rdata[2] === 1'b1, "mask enable visible in status");
      command(1, m6, 0, 0);
    end
    h8_done = 1;
  end

  // ---------------- three-variable checker and test generator ----------------
  initial begin : small_test
    logic [2:0][1:0] ex [5];
    logic [7:0]      after [5];
    @(posedge rst_n);
    // worked example: positional cubes c1..c5 and latches set by each
    ex[0] = {2'b01, 2'b11, 2'b10}; after[0] = 8'b0101_0000;
    ex[1] = {2'b10, 2'b10, 2'b11}; after[1] = 8'b1101_1000;
    ex[2] = {2'b10, 2'b01, 2'b10}; after[2] = 8'b1111_1000;
    ex[3] = {2'b11, 2'b01, 2'b01}; after[3] = 8'b1111_1011;
    ex[4] = {2'b01, 2'b10, 2'b01}; after[4] = 8'b1111_1111;
    @(negedge clk); h3_clr = 1; @(negedge clk); h3_clr = 0;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); h3_cube = ex[k]; h3_apply = 1;
      @(negedge clk); h3_apply = 0;
      chk(h3_r === after[k] && h3_taut === (k == 4), $sformatf("example step %0d: r=%b", k + 1, h3_r));
    end
    n_ex41++;

    for (int e = 0; e < 200; e++) begin
      automatic int nc = 1 + $urandom % 6;
      automatic logic [7:0] f = '0;
      int first;
      @(negedge clk); tg_clr = 1; @(negedge clk); tg_clr = 0;
      for (int k = 0; k < nc; k++) begin
        logic [2:0][1:0] c;
        for (int i = 0; i < 3; i++) c[i] = ($urandom % 3 == 0) ? 2'b11 : (($urandom % 2) ? 2'b10 : 2'b01);
        for (int m = 0; m < 8; m++) if (covers3(c, m)) f[m] = 1'b1;
        @(negedge clk); tg_cube = c; tg_apply = 1;
        @(negedge clk); tg_apply = 0;
      end
      first = -1;
      for (int m = 7; m >= 0; m--) if (!f[m]) first = m;
      if (first < 0) begin
        n_notest++;
        chk(tg_t === 1'b1, "test generator: tautology, no test");
      end else begin
        n_test++;
        chk(tg_t === 1'b0 && tg_code === 3'(first) && !f[tg_code], $sformatf("test generator: code %0d expected %0d", tg_code, first));
      end
      chk(tg_y === f, "test generator latches");
    end
    small_done = 1;
  end

  initial begin
    wait (h8_done && small_done);
    $display("mechanisms: clear=%0d taut=%0d nontaut=%0d mode8=%0d mode6=%0d switch=%0d mask_in=%0d mask_out=%0d drop=%0d example=%0d test=%0d notest=%0d",
             n_clear, n_taut, n_nontaut, n_mode8, n_mode6, n_switch, n_mask_in, n_mask_out, n_drop, n_ex41, n_test, n_notest);
    chk(n_clear > 0,    "mechanism: clear");
    chk(n_taut > 0,     "mechanism: tautology found");
    chk(n_nontaut > 0,  "mechanism: non-tautology found");
    chk(n_mode8 > 0,    "mechanism: 8-input configuration");
    chk(n_mode6 > 0,    "mechanism: 6-input 4-output configuration");
    chk(n_switch > 0,   "mechanism: configuration switch");
    chk(n_mask_in > 0,  "mechanism: implication holds under mask");
    chk(n_mask_out > 0, "mechanism: implication fails under mask");
    chk(n_drop > 0,     "mechanism: cube dropped by mask");
    chk(n_ex41 > 0,     "mechanism: three-variable example");
    chk(n_test > 0,     "mechanism: test found");
    chk(n_notest > 0,   "mechanism: no test (tautology)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
