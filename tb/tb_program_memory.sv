// tb_program_memory: loads all 16 words, reads them back, then overwrites
// random words (with write enable randomly low) and checks every word
// against a shadow copy after each edge.
module tb_program_memory;
  logic        clk = 1'b0, we;
  logic [3:0]  rd_addr, wr_addr;
  logic [15:0] rd_data, wr_data;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  program_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 16; a++) begin
      rd_addr = 4'(a); #1;
      checks++;
      if (rd_data !== shadow[a]) begin
        failures++; $display("imem[%0d] = %04h, expected %04h", a, rd_data, shadow[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); we = 1'b1; wr_addr = 4'(a); wr_data = 16'(a * 16'h1111 ^ 16'h5A0F);
      shadow[a] = wr_data;
    end
    @(negedge clk); we = 1'b0;
    check_all();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); wr_addr = 4'($urandom); wr_data = 16'($urandom);
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
