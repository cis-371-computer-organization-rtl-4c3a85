// lc4_alu_tb: random instructions and operands against an expected-value
// function written from the LC4 instruction set, plus directed corner
// cases (divide/modulo by zero, signed vs unsigned compares, arithmetic
// shift of a negative value, JSR's PC[15] preservation). Every opcode and
// sub-operation is counted and one that never occurred fails.
module lc4_alu_tb;
  logic [15:0] insn, pc, r1data, r2data, out;
  int checks = 0, failures = 0;
  int seen [40];
  lc4_alu dut (.*);

  function automatic logic [15:0] expect_out(logic [15:0] i, logic [15:0] p, logic [15:0] a, logic [15:0] b, output int cls);
    int sa, sb;
    cls = int'(i[15:12]);
    case (i[15:12])
      4'h0: return p + 1 + 16'($signed(i[8:0]));
      4'h1: begin
        cls = 16 + (i[5] ? 4 : int'(i[4:3]));
        if (i[5]) return a + 16'($signed(i[4:0]));
        case (i[4:3]) 0: return a + b; 1: return a * b; 2: return a - b;
                      default: return b == 0 ? 0 : a / b; endcase
      end
      4'h2: begin
        cls = 25 + int'(i[8:7]);
        case (i[8:7])
          0: begin sa = int'($signed(a)); sb = int'($signed(b)); end
          1: begin sa = int'(a); sb = int'(b); end
          2: begin sa = int'($signed(a)); sb = int'($signed(i[6:0])); end
          default: begin sa = int'(a); sb = int'(i[6:0]); end
        endcase
        return sa < sb ? 16'hFFFF : sa == sb ? 16'h0 : 16'h1;
      end
      4'h4: return i[11] ? {p[15], i[10:0], 4'h0} : a;
      4'h5: begin
        cls = 29 + (i[5] ? 4 : int'(i[4:3]));
        if (i[5]) return a & 16'($signed(i[4:0]));
        case (i[4:3]) 0: return a & b; 1: return ~a; 2: return a | b; default: return a ^ b; endcase
      end
      4'h6, 4'h7: return a + 16'($signed(i[5:0]));
      4'h8: return a;
      4'h9: return 16'($signed(i[8:0]));
      4'hA: begin
        cls = 21 + int'(i[5:4]);
        case (i[5:4]) 0: return a << i[3:0]; 1: return 16'($signed(a) >>> i[3:0]);
                      2: return a >> i[3:0]; default: return b == 0 ? 0 : a % b; endcase
      end
      4'hC: return i[11] ? p + 1 + 16'($signed(i[10:0])) : a;
      4'hD: return {i[7:0], a[7:0]};
      4'hF: return {8'h80, i[7:0]};
      default: return 0;
    endcase
  endfunction

  task automatic run_one();
    logic [15:0] e;
    int cls;
    #1;
    e = expect_out(insn, pc, r1data, r2data, cls);
    seen[cls]++;
    checks++;
    if (out !== e) begin
      failures++;
      if (failures < 15) $display("FAIL insn %h pc %h a %h b %h: out %h expected %h", insn, pc, r1data, r2data, out, e);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int n = 0; n < 50000; n++) begin
      insn = 16'($urandom); pc = 16'($urandom);
      r1data = ($urandom_range(0, 7) == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'($urandom);
      r2data = ($urandom_range(0, 9) == 0) ? 16'd0 : ($urandom_range(0, 4) == 0) ? r1data : 16'($urandom);
      run_one();
    end
    // Directed corners.
    insn = 16'h11D8; r1data = 16'd7; r2data = 16'd0; pc = 0; run_one();      // DIV by 0
    insn = 16'hA3F0; r1data = 16'd7; r2data = 16'd0; run_one();              // MOD by 0
    insn = 16'h2201; r1data = 16'hFFFF; r2data = 16'h0001; run_one();        // CMP -1 < 1
    insn = 16'h2281; r1data = 16'hFFFF; r2data = 16'h0001; run_one();        // CMPU 0xFFFF > 1
    insn = 16'hA05F; r1data = 16'h8000; run_one();                           // SRA by 15
    insn = 16'h4FFF; pc = 16'hF123; run_one();                               // JSR keeps PC[15]
    for (int k = 0; k < 34; k++)
      if (k inside {0, 4, 6, 7, 8, 9, 12, 13, 15} || k >= 16) begin
        checks++;
        if (seen[k] == 0) begin failures++; $display("class %0d never exercised", k); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
