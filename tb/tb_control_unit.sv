// tb_control_unit: checks the control word of every opcode against the
// i281 control table, for all X/Y field values and all 16 flag
// combinations. Each table row is written below as a string with one
// character per column group:
//   imem pcmux pcwe port0 port1 wsel rwe asrc alu1 alu0 fwe arm dim dwe rwb
// where port0/port1/wsel are 'X', 'Y' or '-' (blank in the table: not
// checked) and pcmux 'B' means "the branch condition of this opcode".
module tb_control_unit;
  import i281_pkg::*;
  logic [NUM_OPS-1:0] op;
  logic [1:0] x, y;
  flags_t flags;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.op, .x, .y, .flags, .ctrl);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                   ipw01sra10fmdeb
  string rows [NUM_OPS] = '{
    /* NOOP    */ "001---000000000",
    /* INPUTC  */ "101---000001000",
    /* INPUTCF */ "101X--011000000",
    /* INPUTD  */ "001---000001110",
    /* INPUTDF */ "001X--011000110",
    /* MOVE    */ "001Y-X111000000",
    /* LOADI   */ "001--X100001000",
    /* ADD     */ "001XYX101010000",
    /* ADDI    */ "001X-X111010000",
    /* SUB     */ "001XYX101110000",
    /* SUBI    */ "001X-X111110000",
    /* LOAD    */ "001--X100001001",
    /* LOADF   */ "001Y-X111000001",
    /* STORE   */ "001-X-000001010",
    /* STOREF  */ "001YX-011000010",
    /* SHIFTL  */ "001X-X100010000",
    /* SHIFTR  */ "001X-X100110000",
    /* CMP     */ "001XY-001110000",
    /* JUMP    */ "011---000000000",
    /* BRE     */ "0B1---000000000",
    /* BRNE    */ "0B1---000000000",
    /* BRG     */ "0B1---000000000",
    /* BRGE    */ "0B1---000000000"
  };

  function automatic logic bit_of(byte c);
    return c == "1";
  endfunction

  task automatic check_bit(string what, int opi, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%0d %s=%b expected %b (x=%b y=%b flags=%b)", opi, what, got, exp, x, y, flags);
    end
  endtask

  task automatic check_sel(string what, int opi, logic [1:0] got, byte c);
    logic [1:0] exp;
    if (c == "-") return;
    exp = (c == "X") ? x : y;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL op=%0d %s=%b expected %b", opi, what, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < NUM_OPS; o++)
      for (int xy = 0; xy < 16; xy++)
        for (int f = 0; f < 16; f++) begin
          string r;
          logic zf, nf, ovf, br;
          op = '0; op[o] = 1'b1;
          x = xy[3:2]; y = xy[1:0];
          flags = flags_t'(f[3:0]);
          #1;
          r = rows[o];
          zf = flags.zf; nf = flags.nf; ovf = flags.of;
          case (o)
            19: br = zf;
            20: br = !zf;
            21: br = !zf && (nf == ovf);
            22: br = (nf == ovf);
            default: br = bit_of(r[1]);
          endcase
          check_bit("IMEM_WRITE_ENABLE", o, ctrl.imem_write_enable, bit_of(r[0]));
          check_bit("PROGRAM_COUNTER_MUX", o, ctrl.pc_mux, br);
          check_bit("PROGRAM_COUNTER_WRITE_ENABLE", o, ctrl.pc_write_enable, bit_of(r[2]));
          check_sel("REGISTERS_PORT0_SELECT", o, ctrl.reg_port0_select, r[3]);
          check_sel("REGISTERS_PORT1_SELECT", o, ctrl.reg_port1_select, r[4]);
          check_sel("REGISTERS_WRITE_SELECT", o, ctrl.reg_write_select, r[5]);
          check_bit("REGISTERS_WRITE_ENABLE", o, ctrl.reg_write_enable, bit_of(r[6]));
          check_bit("ALU_SOURCE_MUX", o, ctrl.alu_source_mux, bit_of(r[7]));
          check_bit("ALU_SELECT1", o, ctrl.alu_select[1], bit_of(r[8]));
          check_bit("ALU_SELECT0", o, ctrl.alu_select[0], bit_of(r[9]));
          check_bit("FLAGS_WRITE_ENABLE", o, ctrl.flags_write_enable, bit_of(r[10]));
          check_bit("ALU_RESULT_MUX", o, ctrl.alu_result_mux, bit_of(r[11]));
          check_bit("DMEM_INPUT_MUX", o, ctrl.dmem_input_mux, bit_of(r[12]));
          check_bit("DMEM_WRITE_ENABLE", o, ctrl.dmem_write_enable, bit_of(r[13]));
          check_bit("REG_WRITEBACK_MUX", o, ctrl.reg_writeback_mux, bit_of(r[14]));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
