// tb_vmcore_alu: self-checking test of the VMCore ALU.
// Applies 4000 random operand sets to every one of the sixteen operations
// and compares DIN, carry, zero and skip flag with a reference computed here
// with plain integer arithmetic.
module tb_vmcore_alu;
  import vmcore_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       cin, c_out, z, sf;
  logic [2:0] bit_sel;
  int checks = 0, failures = 0;

  vmcore_alu dut (.op, .a, .b, .cin, .bit_sel, .y, .c_out, .z, .sf);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, r;
    logic [7:0] ey;
    logic       ec, check_c;
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'(n % 16);
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom); bit_sel = 3'($urandom);
      if (n % 97 == 0) begin a = b; end
      ia = int'(a); ib = int'(b);
      check_c = 1'b1; ec = 1'b0;
      case (op)
        ALU_PASS: ey = b;
        ALU_ZERO: ey = 0;
        ALU_ADD:  begin r = ia + ib;        ey = 8'(r); ec = (r > 255); end
        ALU_ADC:  begin r = ia + ib + cin;  ey = 8'(r); ec = (r > 255); end
        ALU_SUB:  begin r = ia - ib;        ey = 8'(r); ec = (r < 0); end
        ALU_SBC:  begin r = ia - ib - cin;  ey = 8'(r); ec = (r < 0); end
        ALU_INC:  begin r = ia + 1;         ey = 8'(r); check_c = 0; end
        ALU_DEC:  begin r = ia - 1;         ey = 8'(r); check_c = 0; end
        ALU_AND:  ey = a & b;
        ALU_OR:   ey = a | b;
        ALU_XOR:  ey = a ^ b;
        ALU_NOT:  ey = ~b;
        ALU_ROL:  begin ey = 8'((ib * 2) % 256 + cin); ec = (ib >= 128); end
        ALU_ROR:  begin ey = 8'(ib / 2 + 128 * cin);   ec = (ib % 2 == 1); end
        ALU_SETB: begin ey = b; ey[bit_sel] = 1'b1; end
        ALU_CLRB: begin ey = b; ey[bit_sel] = 1'b0; end
        default:  ey = 'x;
      endcase
      #1;
      checks++;
      if (y !== ey || (check_c && c_out !== ec) || z !== (ey == 0) || sf !== ((ib >> bit_sel) % 2 == 1)) begin
        failures++;
        if (failures < 10)
          $display("ALU mismatch op=%s a=%02x b=%02x cin=%0d i=%0d: y=%02x c=%0d z=%0d sf=%0d, expected y=%02x c=%0d",
                   op.name(), a, b, cin, bit_sel, y, c_out, z, sf, ey, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
