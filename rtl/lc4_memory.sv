// lc4_memory: LC4 main memory with memory-mapped I/O.
//
// 2^16 words of 16 bits, modelled as an array so that an FPGA tool maps it
// to block RAM, with three ports that are all read on the little-clock edge:
//   instruction port  i_addr -> i_dout, sampled when i_re is high
//   data port         d_addr -> d_dout, sampled when d_re is high;
//                     written with d_din when d_we and gwe are both high, so
//                     a store commits on the big-clock edge
//   video port        vga_addr -> vga_data, sampled every edge; vga_addr is
//                     the pixel index (row*128 + column) into the
//                     128 x 120-word frame buffer that starts at 0xC000;
//                     an index past the frame reads as 0
// The data port also decodes the device registers (addresses in lc4_pkg):
// reads of KBSR, KBDR and TSR return the keyboard and timer inputs, SWITCH
// returns the board switches, and TIR, LED and SEVSEG are writable
// registers whose values drive outputs (tir_we pulses on a TIR write so a
// timer can restart). Those addresses do not reach the array; every other
// address, the frame buffer included, is plain memory.
// The array is cleared at start-up and then, if INIT_FILE is not empty,
// loaded from that hex memory image, as a program image is loaded into the
// block RAM. Device registers clear on rst.
// Size, word width, clocked reads, the frame size and the list of devices
// follow the lab hints; the device addresses, the separate video port and
// the register behaviour are this design's choices.
module lc4_memory
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W    = 16,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              gwe,
  // instruction port
  input  logic              i_re,
  input  logic [ADDR_W-1:0] i_addr,
  output logic [15:0]       i_dout,
  // data port
  input  logic              d_re,
  input  logic [ADDR_W-1:0] d_addr,
  input  logic [15:0]       d_din,
  input  logic              d_we,
  output logic [15:0]       d_dout,
  // video port
  input  logic [13:0]       vga_addr,
  output logic [15:0]       vga_data,
  // devices
  input  logic [15:0]       kbsr,
  input  logic [15:0]       kbdr,
  input  logic [15:0]       tsr,
  input  logic [7:0]        switches,
  output logic [15:0]       tir,
  output logic              tir_we,
  output logic [7:0]        leds,
  output logic [15:0]       sevseg
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [15:0] ram [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) ram[a] = 16'd0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, ram);
  end

  // Full 16-bit view of the data address for the device decode.
  logic [15:0] d_addr16, vga_word;
  logic        is_dev_wr, is_dev_rd;
  logic [15:0] dev_rdata;

  assign d_addr16 = 16'(d_addr);
  assign vga_word = VIDEO_BASE + 16'(vga_addr);

  always_comb begin
    is_dev_rd = 1'b1;
    unique case (d_addr16)
      ADDR_KBSR:   dev_rdata = kbsr;
      ADDR_KBDR:   dev_rdata = kbdr;
      ADDR_TSR:    dev_rdata = tsr;
      ADDR_TIR:    dev_rdata = tir;
      ADDR_SWITCH: dev_rdata = {8'd0, switches};
      ADDR_LED:    dev_rdata = {8'd0, leds};
      ADDR_SEVSEG: dev_rdata = sevseg;
      default: begin
        dev_rdata = 16'd0;
        is_dev_rd = 1'b0;
      end
    endcase
  end
  assign is_dev_wr = is_dev_rd;

  // Array ports.
  always_ff @(posedge clk) begin
    if (i_re) i_dout <= ram[i_addr];
    if (d_re) d_dout <= is_dev_rd ? dev_rdata : ram[d_addr];
    vga_data <= (32'(vga_addr) < VIDEO_WORDS) ? ram[ADDR_W'(vga_word)] : 16'd0;
    if (d_we && gwe && !is_dev_wr) ram[d_addr] <= d_din;
  end

  // Device registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      tir    <= 16'd0;
      tir_we <= 1'b0;
      leds   <= 8'd0;
      sevseg <= 16'd0;
    end else begin
      tir_we <= 1'b0;
      if (d_we && gwe) begin
        unique case (d_addr16)
          ADDR_TIR: begin
            tir    <= d_din;
            tir_we <= 1'b1;
          end
          ADDR_LED:    leds   <= d_din[7:0];
          ADDR_SEVSEG: sevseg <= d_din;
          default: ;
        endcase
      end
    end
  end

endmodule
