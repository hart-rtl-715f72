// tb_hart_st_workload: the S(n)/T(n) benchmark on the 256-latch checker.
// S(n) = x1 + x2 + ... + xn is not a tautology (it is 0 when every input is
// 0); T(n) = S(n) + ~x1 ~x2 ... ~xn is.  For n <= 8 the expression goes to the
// checker directly, with unused variables sent as "11".  For n = 9..13 the
// testbench plays the host: it splits on x9..xn (one sub-problem per
// assignment, 2^(n-8) of them), cofactors every cube (cubes that contradict
// the assignment are dropped, the rest keep their x1..x8 parts), sends each
// sub-problem and ANDs the answers.  Each sub-answer is compared with a truth
// table computed here, and the overall answers must be "no" for S(n) and
// "yes" for T(n).  The clock count per sub-problem is printed.
module tb_hart_st_workload;
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

  typedef logic [12:0][1:0] bigcube_t;   // up to 13 variables, part j = x(j+1)

  longint cycles = 0;
  always @(posedge clk) cycles++;

  task automatic write(logic [2:0] a, logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one eight-variable sub-problem, return the checker's answer
  task automatic run_sub(logic [15:0] cubes [$], output bit answer);
    logic [255:0] tt = '0;
    write(REG_CMD, 8'b0000_0001);            // clear, 8-input configuration
    foreach (cubes[k]) begin
      write(REG_CUBE0, cubes[k][7:0]);
      write(REG_CUBE1, cubes[k][15:8]);
      for (int m = 0; m < 256; m++) begin
        automatic bit in = 1;
        for (int i = 0; i < 8; i++) if (!cubes[k][2*i + m[7-i]]) in = 0;
        if (in) tt[m] = 1'b1;
      end
    end
    @(negedge clk);
    addr = REG_STATUS;
    #1;
    answer = rdata[0];
    chk(answer === &tt && latches === tt, "sub-problem answer against truth table");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 6; n <= 13; n++) begin
      for (int which = 0; which < 2; which++) begin   // 0: S(n), 1: T(n)
        bigcube_t f [$];
        int       nsplit, nsub;
        bit       result;
        longint   c0;
        f = {};
        for (int j = 0; j < n; j++) begin
          automatic bigcube_t c = '1;
          c[j] = 2'b10;                               // x(j+1)
          f.push_back(c);
        end
        if (which == 1) begin
          automatic bigcube_t c = '1;
          for (int j = 0; j < n; j++) c[j] = 2'b01;   // ~x1 ... ~xn
          f.push_back(c);
        end
        nsplit = (n > 8) ? n - 8 : 0;
        nsub   = 1 << nsplit;
        result = 1;
        c0     = cycles;
        for (int a = 0; a < nsub; a++) begin
          logic [15:0] sub [$];
          bit ans;
          sub = {};
          foreach (f[k]) begin
            automatic bit keep = 1;
            for (int s = 0; s < nsplit; s++)
              if (!f[k][8 + s][a[s]]) keep = 0;         // literal contradicts x(9+s) = a[s]
            if (keep) sub.push_back(16'(f[k][7:0]));
          end
          run_sub(sub, ans);
          result &= ans;
        end
        chk(result === (which == 1), $sformatf("%s(%0d) answer %b", which ? "T" : "S", n, result));
        $display("%s(%0d): %0d sub-problem(s), %0d clock cycles, tautology=%b",
                 which ? "T" : "S", n, nsub, cycles - c0, result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
