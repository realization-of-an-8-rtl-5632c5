// tb_data_memory: fills every one of the 4096 words with a pattern derived
// from its address, reads them all back on both read ports, then does
// random writes with and without write enable and compares against a
// shadow copy. A write must be visible on the read ports after the clock
// edge, not before.
module tb_data_memory;
  logic        clk = 1'b0, we;
  logic [11:0] rd_addr, dbg_addr, wr_addr;
  logic [7:0]  rd_data, dbg_data, wr_data;
  logic [7:0]  shadow [4096];
  int checks = 0, failures = 0;

  data_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s = %02h, expected %02h", what, got, exp); end
  endtask

  function automatic logic [7:0] pattern(int a);
    return 8'((a * 37) ^ (a >> 8));
  endfunction

  initial begin
    we = 1'b0; rd_addr = 0; dbg_addr = 0; wr_addr = 0; wr_data = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); we = 1'b1; wr_addr = 12'(a); wr_data = pattern(a); shadow[a] = pattern(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < 4096; a++) begin
      rd_addr = 12'(a); dbg_addr = 12'(4095 - a); #1;
      check($sformatf("mem[%0d]", a), rd_data, pattern(a));
      check($sformatf("dbg[%0d]", 4095 - a), dbg_data, pattern(4095 - a));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wr_addr = 12'($urandom_range(0, 31)); wr_data = 8'($urandom);
      rd_addr = wr_addr; dbg_addr = 12'($urandom_range(0, 31));
      #1;
      check("before edge", rd_data, shadow[rd_addr]);
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      #1;
      check("after edge", rd_data, shadow[rd_addr]);
      check("dbg", dbg_data, shadow[dbg_addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
