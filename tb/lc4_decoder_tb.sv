// lc4_decoder_tb: every opcode with random operand fields, against a
// per-instruction table of register selects, write enables and mux selects.
module lc4_decoder_tb;
  import lc4_pkg::*;
  logic [15:0] insn;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  lc4_decoder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Expected {r1sel(2), r2sel, wsel_r7, rf_we, nzp_we, sel_pc_inc, load, store}
    logic [8:0] exp, got;
    for (int n = 0; n < 4000; n++) begin
      insn = 16'($urandom);
      insn[15:12] = 4'(n % 16);
      #1;
      case (insn[15:12])
        4'h1, 4'h5, 4'h9, 4'hA: exp = 9'b00_0_0_1_1_0_0_0;
        4'h2:                   exp = 9'b01_0_0_0_1_0_0_0;
        4'hD:                   exp = 9'b01_0_0_1_1_0_0_0;
        4'h6:                   exp = 9'b00_0_0_1_1_0_1_0;
        4'h7:                   exp = 9'b00_1_0_0_0_0_0_1;
        4'h4, 4'hF:             exp = 9'b00_0_1_1_1_1_0_0;
        4'h8:                   exp = 9'b10_0_0_0_0_0_0_0;
        default:                exp = 9'b00_0_0_0_0_0_0_0;
      endcase
      got = {ctrl.r1sel, ctrl.r2sel, ctrl.wsel_r7, ctrl.regfile_we, ctrl.nzp_we,
             ctrl.sel_pc_inc, ctrl.is_load, ctrl.is_store};
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL insn %h: %b expected %b", insn, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
