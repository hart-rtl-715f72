// tb_hart_basic: the three-variable tautology checker.
// Part 1 replays the worked example F = x1~x3 + x2x3 + x1~x2x3 + ~x1~x2 +
// ~x1x2~x3: after each cube exactly the expected latches are set
// (r4 r6; r3 r7; r5; r0 r1; r2) and the AND output rises only after the
// last one.  Part 2 applies random expressions one cube per cycle and compares
// latches and result with a truth table evaluated in the testbench.  The
// result must be visible one cycle after the last apply.
module tb_hart_basic;
  int checks = 0, failures = 0;
  logic            clk = 0, rst_n = 0, clr = 0, apply = 0;
  logic [2:0][1:0] cube = '0;
  logic [7:0]      r;
  logic            taut;

  hart_basic #(.N(3)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .apply(apply), .cube(cube), .r(r), .taut(taut));

  always #5 clk = ~clk;

  // printed positional string "x1^0 x1^1 x2^0 x2^1 x3^0 x3^1" -> parts
  function automatic logic [2:0][1:0] pc(input logic [5:0] s);
    logic [2:0][1:0] c;
    for (int i = 0; i < 3; i++) c[i] = {s[4-2*i], s[5-2*i]};
    return c;
  endfunction

  // truth value of minterm m (x1 = bit 2) under cube c
  function automatic bit covers(logic [2:0][1:0] c, int m);
    bit ok = 1;
    for (int i = 0; i < 3; i++) begin
      bit v = m[2-i];
      if (v && !c[i][1]) ok = 0;
      if (!v && !c[i][0]) ok = 0;
    end
    return ok;
  endfunction

  task automatic apply_cube(logic [2:0][1:0] c);
    @(negedge clk);
    cube  = c;
    apply = 1;
    @(negedge clk);
    apply = 0;
  endtask

  task automatic do_clear();
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
  endtask

  task automatic expect_r(logic [7:0] e, logic et, string what);
    checks++;
    if (r !== e || taut !== et) begin
      failures++;
      $display("%s: r=%b taut=%b expected r=%b taut=%b", what, r, taut, e, et);
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
    logic [2:0][1:0] ex [5];
    logic [7:0]      steps [5];
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_r(8'h00, 1'b0, "after reset");

    ex[0] = pc(6'b01_11_10);  steps[0] = 8'b0101_0000;   // r4 r6
    ex[1] = pc(6'b11_01_01);  steps[1] = 8'b1000_1000;   // r3 r7
    ex[2] = pc(6'b01_10_01);  steps[2] = 8'b0010_0000;   // r5
    ex[3] = pc(6'b10_10_11);  steps[3] = 8'b0000_0011;   // r0 r1
    ex[4] = pc(6'b10_01_10);  steps[4] = 8'b0000_0100;   // r2
    begin
      automatic logic [7:0] acc = '0;
      for (int k = 0; k < 5; k++) begin
        apply_cube(ex[k]);
        acc |= steps[k];
        expect_r(acc, (k == 4), $sformatf("example cube c%0d", k + 1));
      end
    end
    do_clear();
    expect_r(8'h00, 1'b0, "after clear");

    for (int e = 0; e < 300; e++) begin
      automatic int ncubes = 1 + $urandom % 8;
      automatic logic [7:0] tt = '0;
      do_clear();
      for (int k = 0; k < ncubes; k++) begin
        logic [2:0][1:0] c;
        for (int i = 0; i < 3; i++) begin
          case ($urandom % 7)
            0, 1:    c[i] = 2'b01;
            2, 3:    c[i] = 2'b10;
            default: c[i] = 2'b11;
          endcase
        end
        for (int m = 0; m < 8; m++) if (covers(c, m)) tt[m] = 1'b1;
        apply_cube(c);
      end
      expect_r(tt, &tt, $sformatf("random expression %0d", e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
