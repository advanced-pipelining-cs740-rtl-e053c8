// alu_tb: every ALU operation on random and corner-case operands, compared
// with results computed here from the operation's definition, including the
// cmoveq write condition and signed overflow of add and subtract.
module alu_tb;
  import alpha_pkg::*;
  alu_op_e     op;
  logic [63:0] a, b, y;
  logic        wr_ok, ovf;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    logic [63:0] corner[6] = '{64'd0, 64'd1, 64'h7fff_ffff_ffff_ffff,
                               64'h8000_0000_0000_0000, '1, 64'd63};
    for (int i = 0; i < 7000; i++) begin
      logic [63:0] ey;
      logic        ew, eo;
      logic signed [64:0] wide;
      op = alu_op_e'(i % 7);
      a  = (i % 5 == 0) ? corner[$urandom_range(5)] : {$urandom, $urandom};
      b  = (i % 3 == 0) ? corner[$urandom_range(5)] : {$urandom, $urandom};
      if (i % 11 == 0) a = '0;
      #1;
      ew = 1'b1; eo = 1'b0;
      case (op)
        ALU_ADD: begin
          wide = $signed({a[63], a}) + $signed({b[63], b});
          ey = wide[63:0]; eo = wide[64] != wide[63];
        end
        ALU_SUB: begin
          wide = $signed({a[63], a}) - $signed({b[63], b});
          ey = wide[63:0]; eo = wide[64] != wide[63];
        end
        ALU_OR:     ey = a | b;
        ALU_XOR:    ey = a ^ b;
        ALU_CMPLT:  ey = ($signed(a) < $signed(b)) ? 64'd1 : 64'd0;
        ALU_CMOVEQ: begin ey = b; ew = (a == 0); end
        default:    ey = b;
      endcase
      checks++;
      if (y !== ey || wr_ok !== ew || ovf !== eo) begin
        failures++;
        $display("FAIL: op %s a=%h b=%h: y=%h wr=%b ovf=%b expected %h %b %b",
                 op.name(), a, b, y, wr_ok, ovf, ey, ew, eo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
