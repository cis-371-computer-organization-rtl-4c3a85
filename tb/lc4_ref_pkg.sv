// lc4_ref_pkg: instruction-level reference model of the LC4 system.
//
// The class lc4_ref holds the architectural state (PC, R0..R7, NZP and the
// 64K-word memory) and executes one instruction per call of step(),
// recording what that instruction writes in the same form as the
// processor's test_* outputs. It is written from the LC4 instruction set
// definition, independently of the RTL, and serves as the trace the
// processor and system testbenches compare against. With io set, it also
// models the device registers of the memory map (reads of keyboard, timer
// and switch inputs, writes to the timer interval, LED and seven-segment
// registers, none of which touch the array).
package lc4_ref_pkg;

  typedef struct {
    logic [15:0] pc;
    logic [15:0] insn;
    logic        rf_we;
    logic [2:0]  rf_reg;
    logic [15:0] rf_in;
    logic        nzp_we;
    logic [2:0]  nzp_in;
    logic        dm_we;
    logic [15:0] dm_addr;
    logic [15:0] dm_value;
    logic        taken;     // next PC is not PC+1
  } trace_t;

  class lc4_ref;
    logic [15:0] pc;
    logic [15:0] r [8];
    logic [2:0]  nzp;
    logic [15:0] mem [65536];
    bit          io;
    logic [15:0] kbsr, kbdr, tsr, tir, sevseg;
    logic [7:0]  sw, leds;
    int          dev_reads, dev_writes;

    function new(bit with_io);
      io = with_io;
      pc = 16'h8200;
      foreach (r[i]) r[i] = 16'd0;
      nzp = 3'b000;
      kbsr = 0; kbdr = 0; tsr = 0; tir = 0; sevseg = 0; sw = 0; leds = 0;
      dev_reads = 0; dev_writes = 0;
    endfunction

    static function logic [2:0] cc(logic [15:0] v);
      return ($signed(v) < 0) ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
    endfunction

    function logic [15:0] load(logic [15:0] a);
      if (io) begin
        dev_reads++;
        case (a)
          16'hFE00: return kbsr;
          16'hFE02: return kbdr;
          16'hFE08: return tsr;
          16'hFE0A: return tir;
          16'hFE0C: return {8'd0, sw};
          16'hFE0E: return {8'd0, leds};
          16'hFE10: return sevseg;
          default: dev_reads--;
        endcase
      end
      return mem[a];
    endfunction

    function void store(logic [15:0] a, logic [15:0] v);
      if (io && (a inside {16'hFE00, 16'hFE02, 16'hFE08, 16'hFE0A, 16'hFE0C, 16'hFE0E, 16'hFE10})) begin
        dev_writes++;
        if (a == 16'hFE0A) tir = v;
        if (a == 16'hFE0E) leds = v[7:0];
        if (a == 16'hFE10) sevseg = v;
      end else
        mem[a] = v;
    endfunction

    // Execute one instruction; return its trace record.
    function trace_t step();
      trace_t t;
      logic [15:0] i, s, tt, d, res, npc;
      logic [2:0]  rd, rs, rt;
      int          a, b;
      i  = mem[pc];
      rd = i[11:9]; rs = i[8:6]; rt = i[2:0];
      s  = r[rs]; tt = r[rt]; d = r[rd];
      t = '{pc: pc, insn: i, rf_we: 0, rf_reg: rd, rf_in: 0, nzp_we: 0, nzp_in: 0,
            dm_we: 0, dm_addr: 0, dm_value: 0, taken: 0};
      npc = pc + 1;
      res = 0;
      case (i[15:12])
        4'h0: if ((i[11:9] & nzp) != 0) npc = pc + 1 + {{7{i[8]}}, i[8:0]};
        4'h1: begin
          t.rf_we = 1;
          if (i[5]) res = s + {{11{i[4]}}, i[4:0]};
          else case (i[4:3])
            0: res = s + tt;
            1: res = s * tt;
            2: res = s - tt;
            3: res = (tt == 0) ? 0 : s / tt;
          endcase
        end
        4'h2: begin
          // CMP compares the register at [11:9] with Rt or an immediate.
          case (i[8:7])
            0: begin a = int'($signed(d)); b = int'($signed(tt)); end
            1: begin a = int'(d); b = int'(tt); end
            2: begin a = int'($signed(d)); b = int'($signed(i[6:0])); end
            3: begin a = int'(d); b = int'(i[6:0]); end
          endcase
          res = (a < b) ? 16'hFFFF : (a == b) ? 16'h0000 : 16'h0001;
          t.nzp_we = 1;
        end
        4'h4: begin
          t.rf_we = 1; t.rf_reg = 7; res = pc + 1;
          npc = i[11] ? ((pc & 16'h8000) | (16'(i[10:0]) << 4)) : s;
        end
        4'h5: begin
          t.rf_we = 1;
          if (i[5]) res = s & {{11{i[4]}}, i[4:0]};
          else case (i[4:3])
            0: res = s & tt;
            1: res = ~s;
            2: res = s | tt;
            3: res = s ^ tt;
          endcase
        end
        4'h6: begin
          t.rf_we = 1;
          t.dm_addr = s + {{10{i[5]}}, i[5:0]};
          res = load(t.dm_addr);
          t.dm_value = res;
        end
        4'h7: begin
          t.dm_we = 1;
          t.dm_addr = s + {{10{i[5]}}, i[5:0]};
          t.dm_value = d;
          store(t.dm_addr, d);
        end
        4'h8: npc = r[7];
        4'h9: begin t.rf_we = 1; res = {{7{i[8]}}, i[8:0]}; end
        4'hA: begin
          t.rf_we = 1;
          case (i[5:4])
            0: res = s << i[3:0];
            1: res = $signed(s) >>> i[3:0];
            2: res = s >> i[3:0];
            3: res = (tt == 0) ? 0 : s % tt;
          endcase
        end
        4'hC: npc = i[11] ? pc + 1 + {{5{i[10]}}, i[10:0]} : s;
        4'hD: begin t.rf_we = 1; res = {i[7:0], d[7:0]}; end
        4'hF: begin t.rf_we = 1; t.rf_reg = 7; res = pc + 1; npc = 16'h8000 | 16'(i[7:0]); end
        default: ;
      endcase
      if (t.rf_we) begin
        t.nzp_we = 1;
        t.rf_in  = res;
        r[t.rf_reg] = res;
      end
      if (t.nzp_we) begin
        t.nzp_in = cc(res);
        nzp = t.nzp_in;
      end
      t.taken = (npc != pc + 1);
      pc = npc;
      return t;
    endfunction
  endclass

  // A random, well-formed LC4 instruction; undefined opcodes are rare.
  function automatic logic [15:0] rand_insn();
    logic [15:0] w;
    int k;
    w = 16'($urandom);
    k = $urandom_range(0, 99);
    if      (k < 10) w[15:12] = 4'h0;
    else if (k < 24) w[15:12] = 4'h1;
    else if (k < 32) w[15:12] = 4'h2;
    else if (k < 35) w[15:12] = 4'h4;
    else if (k < 47) w[15:12] = 4'h5;
    else if (k < 56) w[15:12] = 4'h6;
    else if (k < 63) w[15:12] = 4'h7;
    else if (k < 65) w[15:12] = 4'h8;
    else if (k < 74) w[15:12] = 4'h9;
    else if (k < 84) w[15:12] = 4'hA;
    else if (k < 88) w[15:12] = 4'hC;
    else if (k < 95) w[15:12] = 4'hD;
    else if (k < 97) w[15:12] = 4'hF;
    else             w[15:12] = 4'h3;
    return w;
  endfunction

endpackage
