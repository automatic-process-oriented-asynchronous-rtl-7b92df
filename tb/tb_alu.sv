// Testbench of the ALU: random and corner operands for ADD, SUB and signed
// LT, compared with an independent integer model.
module tb_alu;
  import diffeq_pkg::*;
  localparam int W = 16;
  int checks = 0, failures = 0;

  alu_op_e op;
  logic [W-1:0] a, b, y;
  alu #(.W(W)) dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [W-1:0] model(alu_op_e o, logic [W-1:0] x, logic [W-1:0] z);
    int sx, sz;
    sx = int'($signed(x));
    sz = int'($signed(z));
    case (o)
      ALU_ADD: return W'(sx + sz);
      ALU_SUB: return W'(sx - sz);
      ALU_LT:  return (sx < sz) ? W'(1) : W'(0);
      default: return '0;
    endcase
  endfunction

  initial begin
    logic [W-1:0] corner [5] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff};
    for (int n = 0; n < 600; n++) begin
      op = alu_op_e'($urandom_range(2));
      a = (n < 75) ? corner[n % 5] : W'($urandom);
      b = (n < 75) ? corner[(n / 5) % 5] : W'($urandom);
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL: op %0d a %h b %h got %h", op, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
