// tb_minterm_gen: exhaustive check of the minterm generator.
// Every positional cube of three variables (all 64 bit patterns, null parts
// included) and 2000 random five-variable cubes are applied; each minterm line
// is compared with set membership worked out from the cube's literal masks:
// minterm m is inside the cube when no variable that is 1 in m lacks its x^1
// literal and no variable that is 0 in m lacks its x^0 literal.
module tb_minterm_gen;
  int checks = 0, failures = 0;

  logic [2:0][1:0] c3;
  logic [7:0]      l3;
  logic [4:0][1:0] c5;
  logic [31:0]     l5;

  minterm_gen #(.N(3)) dut3 (.cube(c3), .line(l3));
  minterm_gen #(.N(5)) dut5 (.cube(c5), .line(l5));

  // membership via masks: one_ok[k]/zero_ok[k] for bit k of the minterm (k = N-1-i)
  function automatic bit inside_cube(int n, logic [9:0] flat, int m);
    int unsigned one_ok = 0, zero_ok = 0;
    for (int i = 0; i < n; i++) begin
      zero_ok[n-1-i] = flat[2*i];
      one_ok[n-1-i]  = flat[2*i+1];
    end
    return ((m & ~one_ok) == 0) && ((~m & ~zero_ok & ((1 << n) - 1)) == 0);
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      c3 = v[5:0];
      #1;
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (l3[m] !== inside_cube(3, {4'b0, c3}, m)) begin
          failures++;
          $display("N=3 cube %b line %0d = %b", c3, m, l3[m]);
        end
      end
    end
    // Example with the printed encoding: x1 ~x3 sets only r4 and r6
    c3 = {2'b01, 2'b11, 2'b10};
    #1;
    checks++;
    if (l3 !== 8'b0101_0000) begin failures++; $display("x1~x3 gives %b", l3); end
    for (int k = 0; k < 2000; k++) begin
      c5 = 10'($urandom);
      if (k % 3 != 0) for (int i = 0; i < 5; i++) if (c5[i] == 2'b00) c5[i] = 2'b11;
      #1;
      for (int m = 0; m < 32; m++) begin
        checks++;
        if (l5[m] !== inside_cube(5, c5, m)) begin
          failures++;
          $display("N=5 cube %b line %0d = %b", c5, m, l5[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
