// tb_hart_mask: the mask module (restriction of each cube to the mask cube).
// 8-input mode is checked by meaning: with a mask cube c whose parts fix or
// free each variable, the restricted cube must contain minterm m exactly when
// the minterm obtained by forcing c's fixed variables into m lies in the
// incoming cube d, and it must be dropped exactly when d and c share no
// minterm.  6-in/4-out mode is checked against the part-wise rule, with the
// four output bits as one part.  With the mask disabled cubes pass unchanged.
module tb_hart_mask;
  import hart_pkg::*;
  int checks = 0, failures = 0;
  logic            clk = 0, rst_n = 0, en = 0, load = 0, in_valid = 0, out_valid;
  hart_mode_e      mode = MODE_8IN_1OUT;
  logic [7:0][1:0] load_cube = '0, in_cube = '0, out_cube;
  int              n_drop = 0, n_pass = 0;

  hart_mask #(.N(8)) dut (.clk(clk), .rst_n(rst_n), .mode(mode), .en(en), .load(load), .load_cube(load_cube),
                          .in_valid(in_valid), .in_cube(in_cube), .out_valid(out_valid), .out_cube(out_cube));

  always #5 clk = ~clk;

  function automatic bit in_cube8(logic [7:0][1:0] c, int m);
    for (int i = 0; i < 8; i++) if (!c[i][m[7-i]]) return 0;
    return 1;
  endfunction

  function automatic logic [7:0][1:0] rand_part_cube(int p_full);
    logic [7:0][1:0] c;
    for (int i = 0; i < 8; i++) c[i] = ($urandom % 100 < p_full) ? 2'b11 : (($urandom % 2) ? 2'b01 : 2'b10);
    return c;
  endfunction

  task automatic load_mask(logic [7:0][1:0] c);
    @(negedge clk); load_cube = c; load = 1;
    @(negedge clk); load = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disabled: transparent
    for (int k = 0; k < 50; k++) begin
      in_cube = 16'($urandom); in_valid = 1'($urandom);
      #1;
      checks++;
      if (out_cube !== in_cube || out_valid !== in_valid) begin failures++; $display("disabled: changed cube"); end
    end
    // 8-input mode, by meaning
    en = 1; mode = MODE_8IN_1OUT;
    for (int t = 0; t < 100; t++) begin
      logic [7:0][1:0] c;
      c = rand_part_cube(50);
      load_mask(c);
      for (int k = 0; k < 20; k++) begin
        logic [7:0][1:0] d;
        bit meets;
        d = rand_part_cube(40);
        in_cube = d; in_valid = 1;
        meets = 0;
        for (int m = 0; m < 256; m++) if (in_cube8(d, m) && in_cube8(c, m)) meets = 1;
        #1;
        checks++;
        if (out_valid !== meets) begin failures++; $display("valid=%b meets=%b", out_valid, meets); end
        if (meets) begin
          n_pass++;
          for (int m = 0; m < 256; m++) begin
            automatic int pm = m;
            for (int i = 0; i < 8; i++) begin
              if (c[i] == 2'b01) pm[7-i] = 1'b0;   // c fixes x = 0
              if (c[i] == 2'b10) pm[7-i] = 1'b1;   // c fixes x = 1
            end
            checks++;
            if (in_cube8(out_cube, m) !== in_cube8(d, pm)) begin
              failures++;
              $display("c=%b d=%b out=%b minterm %0d", c, d, out_cube, m);
            end
          end
        end else n_drop++;
        @(negedge clk);
      end
    end
    // 6-in/4-out mode, part-wise rule
    mode = MODE_6IN_4OUT;
    for (int t = 0; t < 50; t++) begin
      logic [7:0][1:0] c;
      c = rand_part_cube(50);
      c[7:6] = 4'($urandom % 15 + 1);
      load_mask(c);
      for (int k = 0; k < 20; k++) begin
        logic [7:0][1:0] d, e;
        bit empty;
        d = rand_part_cube(40);
        d[7:6] = 4'($urandom);
        in_cube = d; in_valid = 1;
        empty = ((d[7:6] & c[7:6]) == 4'b0);
        for (int i = 0; i < 6; i++) if ((d[i] & c[i]) == 2'b00) empty = 1;
        for (int i = 0; i < 8; i++) e[i] = (d[i] & c[i]) | ~c[i];
        #1;
        checks++;
        if (out_valid !== !empty || (!empty && out_cube !== e)) begin
          failures++;
          $display("6x4: c=%b d=%b out=%b/%b expected %b/%b", c, d, out_cube, out_valid, e, !empty);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_drop == 0 || n_pass == 0) begin failures++; $display("coverage drop=%0d pass=%0d", n_drop, n_pass); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
