// tb_register_file: random writes and reads against a shadow array. Checks
// the reset value, that a write is visible on all four read ports from the
// next cycle on, that nothing changes without write enable, and that R0 is
// mirrored on its dedicated port.
module tb_register_file;
  logic       clk = 1'b0, rst, we;
  logic [3:0] ra_addr, rb_addr, dbg_addr, wr_addr;
  logic [7:0] ra_data, rb_data, r0_data, dbg_data, wr_data;
  logic [7:0] shadow [16];
  int checks = 0, failures = 0;

  register_file dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s = %02h, expected %02h", what, got, exp); end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; ra_addr = 0; rb_addr = 0; dbg_addr = 0; wr_addr = 0; wr_data = 0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++) begin
      shadow[i] = 8'h00; dbg_addr = 4'(i); #1; check($sformatf("reset R%0d", i), dbg_data, 8'h00);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wr_addr = 4'($urandom); wr_data = 8'($urandom);
      ra_addr = 4'($urandom); rb_addr = 4'($urandom); dbg_addr = 4'($urandom);
      #1;
      check("ra", ra_data, shadow[ra_addr]);
      check("rb", rb_data, shadow[rb_addr]);
      check("r0", r0_data, shadow[0]);
      check("dbg", dbg_data, shadow[dbg_addr]);
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
