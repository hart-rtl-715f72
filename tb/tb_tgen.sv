// tb_tgen: the three-variable test-generation hardware.
// Random expressions are applied one cube per cycle.  Afterwards the reported
// code must be an input vector at which the expression (evaluated in the
// testbench) is 0, and the lowest such vector; T must be 1 exactly when the
// expression is a tautology.  Includes the worked example without its last
// cube, whose only test is x1 x2 x3 = 0 1 0.
module tb_tgen;
  int checks = 0, failures = 0;
  logic            clk = 0, rst_n = 0, clr = 0, apply = 0;
  logic [2:0][1:0] cube = '0;
  logic [7:0]      y;
  logic            t;
  logic [2:0]      code;
  int              n_taut = 0, n_test = 0;

  tgen #(.N(3)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .apply(apply), .cube(cube), .y(y), .t(t), .code(code));

  always #5 clk = ~clk;

  function automatic bit covers(logic [2:0][1:0] c, int m);
    bit ok = 1;
    for (int i = 0; i < 3; i++) begin
      if (m[2-i] && !c[i][1]) ok = 0;
      if (!m[2-i] && !c[i][0]) ok = 0;
    end
    return ok;
  endfunction

  task automatic apply_cube(logic [2:0][1:0] c);
    @(negedge clk); cube = c; apply = 1;
    @(negedge clk); apply = 0;
  endtask

  task automatic do_clear();
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
  endtask

  task automatic check_result(logic [2:0][1:0] cs [$], string what);
    int first = -1;
    for (int m = 7; m >= 0; m--) begin
      bit f = 0;
      foreach (cs[k]) if (covers(cs[k], m)) f = 1;
      if (!f) first = m;
    end
    checks++;
    if (first < 0) begin
      n_taut++;
      if (t !== 1'b1) begin failures++; $display("%s: tautology missed, t=%b code=%0d", what, t, code); end
    end else begin
      n_test++;
      if (t !== 1'b0 || code !== 3'(first)) begin
        failures++;
        $display("%s: t=%b code=%0d expected test %0d", what, t, code, first);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0][1:0] cs [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // example cubes c1..c4: x1~x3, x2x3, x1~x2x3, ~x1~x2
    cs = '{ {2'b01, 2'b11, 2'b10}, {2'b10, 2'b10, 2'b11}, {2'b10, 2'b01, 2'b10}, {2'b11, 2'b01, 2'b01} };
    do_clear();
    foreach (cs[k]) apply_cube(cs[k]);
    check_result(cs, "example without c5");
    checks++;
    if (code !== 3'b010) begin failures++; $display("example: code=%b expected 010", code); end

    for (int e = 0; e < 300; e++) begin
      automatic int ncubes = 1 + $urandom % 8;
      cs = {};
      do_clear();
      for (int k = 0; k < ncubes; k++) begin
        logic [2:0][1:0] c;
        for (int i = 0; i < 3; i++) c[i] = ($urandom % 3 == 0) ? 2'b11 : (($urandom % 2) ? 2'b10 : 2'b01);
        cs.push_back(c);
        apply_cube(c);
      end
      check_result(cs, $sformatf("random %0d", e));
    end
    checks++;
    if (n_taut == 0 || n_test == 0) begin failures++; $display("coverage: taut=%0d test=%0d", n_taut, n_test); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
