// tb_sdf_alu: random and corner-case vectors for the EP arithmetic unit,
// compared with a reference model written in the test bench.
module tb_sdf_alu;
  import sdf_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  sdf_alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] p, logic [31:0] q);
    case (o)
      ALU_ADD: return p + q;
      ALU_SUB: return p - q;
      ALU_MUL: return p * q;
      ALU_DIV: return (q == 0) ? 32'hFFFF_FFFF : 32'($signed(p) / $signed(q));
      ALU_AND: return p & q;
      ALU_OR:  return p | q;
      ALU_XOR: return p ^ q;
      ALU_SLT: return {31'd0, $signed(p) < $signed(q)};
      ALU_SHL: return p << q[4:0];
      ALU_SHR: return p >> q[4:0];
      ALU_PASSA: return p;
      ALU_PASSB: return q;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the worked example: A=3 B=4 X=10 Y=2
    op = ALU_MUL; a = 12; b = 7; #1;
    checks++; if (y != 84) begin failures++; $display("FAIL mul %0d", y); end
    op = ALU_DIV; a = 8; b = 7; #1;
    checks++; if (y != 1) begin failures++; $display("FAIL div %0d", y); end
    op = ALU_DIV; a = -32'sd9; b = 2; #1;
    checks++; if ($signed(y) != -4) begin failures++; $display("FAIL sdiv %0d", $signed(y)); end
    op = ALU_DIV; a = 5; b = 0; #1;
    checks++; if (y != 32'hFFFF_FFFF) begin failures++; $display("FAIL div0"); end
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'($urandom_range(0, 11));
      a  = $urandom; b = (i % 4 == 0) ? $urandom_range(0, 40) : $urandom;
      #1;
      checks++;
      if (y !== ref_y(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, ref_y(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
