// tb_hart_and_module: the AND modules (latch module choice and final AND).
// Select line k must be high exactly when the five-variable minterm k (x1 the
// most significant bit) lies inside the cube's upper parts; the result must be
// the AND of the 32 module outputs.
module tb_hart_and_module;
  int checks = 0, failures = 0;
  logic [4:0][1:0] cube_hi;
  logic [31:0]     mod_all, sel;
  logic            taut;

  hart_and_module #(.NSEL(5)) dut (.cube_hi(cube_hi), .mod_all(mod_all), .sel(sel), .taut(taut));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic [31:0] e;
      cube_hi = 10'($urandom);
      mod_all = ($urandom % 2) ? 32'hFFFF_FFFF : ~(32'h1 << ($urandom % 32));
      if ($urandom % 5 == 0) mod_all = 32'($urandom);
      // expected select: walk the cube variable by variable, keeping the
      // minterms whose bit for that variable has a literal in the cube
      e = 32'hFFFF_FFFF;
      for (int i = 0; i < 5; i++) begin
        automatic logic [31:0] ones_set = '0;
        for (int m = 0; m < 32; m++) ones_set[m] = m[4-i];
        if (!cube_hi[i][1]) e &= ~ones_set;
        if (!cube_hi[i][0]) e &= ones_set;
      end
      #1;
      checks++;
      if (sel !== e || taut !== (mod_all == 32'hFFFF_FFFF)) begin
        failures++;
        $display("cube %b: sel=%h expected %h, taut=%b", cube_hi, sel, e, taut);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
