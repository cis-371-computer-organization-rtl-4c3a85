// lc4_pkg: types and constants shared by the LC4 single-cycle system.
//
// Holds the LC4 opcode encoding (instruction bits [15:12]), the reset PC,
// the memory map of the frame buffer and device registers, and the control
// word that the decoder hands to the datapath. The reset PC (0x8200) and the
// 128x120 frame size follow the lab hints; the opcode values are those of the
// LC4 instruction set; the device register addresses are this design's own
// choice, placed in the LC-3-style device page at 0xFE00.
package lc4_pkg;

  typedef enum logic [3:0] {
    OP_BR     = 4'b0000,
    OP_ARITH  = 4'b0001,
    OP_CMP    = 4'b0010,
    OP_JSR    = 4'b0100,
    OP_LOGIC  = 4'b0101,
    OP_LDR    = 4'b0110,
    OP_STR    = 4'b0111,
    OP_RTI    = 4'b1000,
    OP_CONST  = 4'b1001,
    OP_SHIFT  = 4'b1010,
    OP_JMP    = 4'b1100,
    OP_HICONST= 4'b1101,
    OP_TRAP   = 4'b1111
  } opcode_e;

  localparam logic [15:0] RESET_PC   = 16'h8200;
  localparam logic [15:0] TRAP_BASE  = 16'h8000;

  // Memory-mapped display: 128 columns x 120 rows of 16-bit pixels.
  localparam int unsigned    VIDEO_COLS  = 128;
  localparam int unsigned    VIDEO_ROWS  = 120;
  localparam int unsigned    VIDEO_WORDS = VIDEO_COLS * VIDEO_ROWS;  // 15360 words
  localparam logic [15:0]    VIDEO_BASE  = 16'hC000;

  // Device registers.
  localparam logic [15:0] ADDR_KBSR   = 16'hFE00;  // keyboard status (read)
  localparam logic [15:0] ADDR_KBDR   = 16'hFE02;  // keyboard data (read)
  localparam logic [15:0] ADDR_TSR    = 16'hFE08;  // timer status (read)
  localparam logic [15:0] ADDR_TIR    = 16'hFE0A;  // timer interval (write/read)
  localparam logic [15:0] ADDR_SWITCH = 16'hFE0C;  // board switches (read)
  localparam logic [15:0] ADDR_LED    = 16'hFE0E;  // board LEDs (write/read)
  localparam logic [15:0] ADDR_SEVSEG = 16'hFE10;  // seven-segment display (write/read)

  // Selects of the register-read muxes (fig. datapath: r1sel from
  // insn[8:6] / insn[11:9] / 7, r2sel from insn[2:0] / insn[11:9]).
  typedef enum logic [1:0] {R1_RS = 2'd0, R1_RD = 2'd1, R1_R7 = 2'd2} r1sel_e;
  typedef enum logic       {R2_RT = 1'b0, R2_RD = 1'b1} r2sel_e;

  // Control word produced by lc4_decoder.
  typedef struct packed {
    r1sel_e      r1sel;       // first read port address source
    r2sel_e      r2sel;       // second read port address source
    logic        wsel_r7;     // write R7 instead of insn[11:9]
    logic        regfile_we;  // register file write enable
    logic        nzp_we;      // NZP register write enable
    logic        sel_pc_inc;  // result mux: PC+1 instead of ALU output
    logic        is_load;     // write-back mux takes data memory output
    logic        is_store;    // data memory write enable
  } ctrl_t;

endpackage
