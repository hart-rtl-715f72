// tb_hart_host_if: the byte-wide host port.
// Checks register write/read-back, that writing the high cube byte yields a
// single apply pulse one cycle later carrying the assembled cube, that clear
// and mask-load are one-cycle pulses, that mode and mask enable stay set, and
// that the status register reflects the tautology input.
module tb_hart_host_if;
  import hart_pkg::*;
  int checks = 0, failures = 0;
  logic            clk = 0, rst_n = 0, wr = 0, taut = 0;
  logic [2:0]      addr = '0;
  logic [7:0]      wdata = '0, rdata;
  logic [7:0][1:0] cube;
  logic            apply, clr, mask_en, mask_load;
  hart_mode_e      mode;
  int              n_apply = 0, n_clr = 0, n_mload = 0;

  hart_host_if dut (.clk(clk), .rst_n(rst_n), .addr(addr), .wr(wr), .wdata(wdata), .rdata(rdata),
                    .cube(cube), .apply(apply), .clr(clr), .mode(mode), .mask_en(mask_en),
                    .mask_load(mask_load), .taut(taut));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n) begin
      if (apply) n_apply++;
      if (clr) n_clr++;
      if (mask_load) n_mload++;
    end
  end

  task automatic write(logic [2:0] a, logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1;
    @(negedge clk); wr = 0;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!apply && !clr && !mask_load && mode == MODE_8IN_1OUT && !mask_en, "reset values");
    for (int k = 0; k < 200; k++) begin
      logic [15:0] v;
      int a0;
      v = 16'($urandom);
      write(REG_CUBE0, v[7:0]);
      chk(!apply, "no apply after low byte");
      addr = REG_CUBE0; #1;
      chk(rdata == v[7:0], "read back low byte");
      a0 = n_apply;
      @(negedge clk); addr = REG_CUBE1; wdata = v[15:8]; wr = 1;
      @(negedge clk); wr = 0;
      chk(apply === 1'b1 && cube === v, $sformatf("apply pulse with cube %h (got %h)", v, cube));
      @(negedge clk);
      chk(apply === 1'b0 && n_apply == a0 + 1, "apply lasts one cycle");
    end
    write(REG_CMD, 8'b0000_0110);   // mode 6x4, mask enable
    chk(mode == MODE_6IN_4OUT && mask_en && !clr && !mask_load, "mode and mask enable set");
    addr = REG_CMD; #1;
    chk(rdata == 8'b0000_0110, "command read-back");
    write(REG_CMD, 8'b0000_1011);   // clear + mask load, mode stays 6x4, mask off
    chk(mode == MODE_6IN_4OUT && !mask_en, "mode kept, mask disabled");
    @(negedge clk);
    chk(n_clr == 1 && n_mload == 1, "one clear and one mask-load pulse");
    taut = 1; addr = REG_STATUS; #1;
    chk(rdata == 8'b0000_0011, "status shows tautology and mode");
    taut = 0; #1;
    chk(rdata == 8'b0000_0010, "status follows tautology input");
    write(REG_CMD, 8'b0000_0000);
    chk(mode == MODE_8IN_1OUT, "back to 8-input mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
