// tb_alu: exhaustive-by-sampling test of the ALU. For every instruct code
// and a few thousand random operand/carry combinations the result, carry
// out, carry-update flag and valid flag are compared with values computed
// here from the operation's definition. Combinational: no clock needed
// beyond a delay per vector.
module tb_alu;
  import cpu_pkg::*;

  logic [3:0] op;
  data_t      a, b, y;
  logic       cin, cout, set_c, valid;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] ey, logic ec, logic es, logic ev);
    checks++;
    if (y !== ey || set_c !== es || valid !== ev || (es && cout !== ec)) begin
      failures++;
      $display("op=%b a=%02h b=%02h cin=%b: y=%02h c=%b s=%b v=%b, expected y=%02h c=%b s=%b v=%b",
               op, a, b, cin, y, cout, set_c, valid, ey, ec, es, ev);
    end
  endtask

  initial begin
    int ia, ib, ic, r;
    for (int n = 0; n < 4000; n++) begin
      op = 4'(n % 16); a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      if (n < 64) begin a = ((n & 1) != 0) ? 8'hFF : 8'h00; b = ((n & 2) != 0) ? 8'hFF : 8'h01; end
      #1;
      ia = int'(a); ib = int'(b); ic = int'(cin);
      case (op)
        4'd0:  check(b, 0, 0, 1);
        4'd1:  begin r = ia + ib;      check(8'(r), r > 255, 1, 1); end
        4'd2:  begin r = ia + ib + ic; check(8'(r), r > 255, 1, 1); end
        4'd3:  begin r = ia - ib - ic; check(8'(r), r < 0, 1, 1); end
        4'd4:  begin r = ia - ib;      check(8'(r), r < 0, 1, 1); end
        4'd6:  check(8'(ia + 1), 0, 0, 1);
        4'd7:  check(8'(ia - 1), 0, 0, 1);
        4'd8:  check(8'(255 - ia), 0, 0, 1);
        4'd9:  check(a & b, 0, 0, 1);
        4'd10: check(a | b, 0, 0, 1);
        4'd11: check(a ^ b, 0, 0, 1);
        4'd12: check(8'(ia / 2), 0, 0, 1);
        4'd13: check(8'(ia * 2), 0, 0, 1);
        default: begin checks++; if (valid !== 1'b0 || set_c !== 1'b0) begin failures++; $display("code %b not rejected", op); end end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
