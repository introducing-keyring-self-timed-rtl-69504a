// tb_keyv_muldiv: drives the iterative multiplier/divider with a plain clock
// (standing in for the inner KeyRing) and compares all eight RV32M operations
// on corner and random operands against 64-bit reference arithmetic. Each
// operation must report done after exactly 32 clocks, and a new tag must
// restart the unit.
module tb_keyv_muldiv;
  import keyv_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic clk = 0, rst_n = 1, done;
  logic [2:0] f3;
  logic [31:0] a, b, res;
  seq_t tag = 0;

  keyv_muldiv dut (.clk_i(clk), .rst_ni(rst_n), .funct3_i(f3), .a_i(a), .b_i(b),
                   .tag_i(tag), .done_o(done), .result_o(res));

  function automatic logic [31:0] model(logic [2:0] op, logic [31:0] x, logic [31:0] y);
    logic signed [63:0] sx, sy;
    logic [63:0] ux, uy, p;
    sx = {{32{x[31]}}, x}; sy = {{32{y[31]}}, y}; ux = {32'd0, x}; uy = {32'd0, y};
    case (op)
      3'd0: begin p = sx * sy; return p[31:0]; end
      3'd1: begin p = sx * sy; return p[63:32]; end
      3'd2: begin p = sx * $signed(uy); return p[63:32]; end
      3'd3: begin p = ux * uy; return p[63:32]; end
      3'd4: if (y == 0) return 32'hFFFF_FFFF;
            else if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) return x;
            else return $signed(x) / $signed(y);
      3'd5: return (y == 0) ? 32'hFFFF_FFFF : x / y;
      3'd6: if (y == 0) return x;
            else if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) return 0;
            else return $signed(x) % $signed(y);
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

  task automatic run(logic [2:0] op, logic [31:0] x, logic [31:0] y);
    int n;
    f3 = op; a = x; b = y; tag = tag + 1;
    #1;
    check(!done, "done before the first step");
    n = 0;
    while (!done && n < 40) begin
      #1 clk = 1; #1 clk = 0; n++;
    end
    check(n == 32, $sformatf("op %0d took %0d steps", op, n));
    check(res == model(op, x, y),
          $sformatf("op %0d %h,%h = %h, expected %h", op, x, y, res, model(op, x, y)));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd7};
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int op = 0; op < 8; op++) begin
      foreach (corner[i]) foreach (corner[j]) run(op[2:0], corner[i], corner[j]);
      for (int k = 0; k < 30; k++) run(op[2:0], $urandom(), (k % 3 == 0) ? $urandom_range(1, 100) : $urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
