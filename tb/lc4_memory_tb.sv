// lc4_memory_tb: checks the three clocked ports and the device decode of the
// LC4 memory against an array model. Random instruction/data/video reads
// and data writes (to random addresses, the frame buffer and the device
// registers): reads must return the word at the sampled address one clock
// later and hold when their enable is low; writes land only when d_we and
// gwe are both high; device reads return the keyboard/timer/switch inputs
// and the TIR/LED/SEVSEG registers, device writes drive those outputs (TIR
// with a one-clock tir_we pulse) and never reach the array.
module lc4_memory_tb;
  localparam logic [15:0] DEV [7] = '{16'hFE00, 16'hFE02, 16'hFE08, 16'hFE0A, 16'hFE0C, 16'hFE0E, 16'hFE10};
  logic clk = 0, rst = 1, gwe, i_re, d_re, d_we, tir_we;
  logic [15:0] i_addr, i_dout, d_addr, d_din, d_dout, vga_data, kbsr, kbdr, tsr, tir, sevseg;
  logic [13:0] vga_addr;
  logic [7:0]  switches, leds;
  logic [15:0] model [65536];
  logic [15:0] m_tir, m_sevseg;
  logic [7:0]  m_leds;
  int checks = 0, failures = 0, n_dev_rd = 0, n_dev_wr = 0, n_wr = 0, n_vga = 0;

  lc4_memory dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string w, logic [15:0] g, logic [15:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 15) $display("FAIL %s: %h expected %h", w, g, e); end
  endtask

  function automatic logic [15:0] dev_or_mem(logic [15:0] a);
    case (a)
      16'hFE00: return kbsr;
      16'hFE02: return kbdr;
      16'hFE08: return tsr;
      16'hFE0A: return m_tir;
      16'hFE0C: return {8'd0, switches};
      16'hFE0E: return {8'd0, m_leds};
      16'hFE10: return m_sevseg;
      default:  return model[a];
    endcase
  endfunction

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_i, exp_d, exp_v;
    logic        is_dev, exp_pulse;
    gwe = 0; i_re = 0; d_re = 0; d_we = 0; i_addr = 0; d_addr = 0; d_din = 0; vga_addr = 0;
    kbsr = 16'h8000; kbdr = 16'h0061; tsr = 16'h0000; switches = 8'hA5;
    foreach (model[a]) model[a] = 16'd0;  // the memory clears itself at start-up
    m_tir = 0; m_leds = 0; m_sevseg = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    exp_i = i_dout; exp_d = d_dout;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      i_re = $urandom_range(0, 1) == 1;
      d_re = $urandom_range(0, 1) == 1;
      d_we = $urandom_range(0, 2) == 0;
      gwe  = $urandom_range(0, 1) == 1;
      i_addr = 16'($urandom);
      case ($urandom_range(0, 5))
        0: d_addr = DEV[$urandom_range(0, 6)];
        1: d_addr = 16'hC000 + 16'($urandom_range(0, 127));
        2: d_addr = i_addr;
        default: d_addr = 16'h8000 + 16'($urandom_range(0, 255));
      endcase
      vga_addr = 14'($urandom_range(0, 127));
      d_din = 16'($urandom);
      kbsr = 16'($urandom); tsr = 16'($urandom);
      is_dev = 0;
      foreach (DEV[k]) if (d_addr == DEV[k]) is_dev = 1;
      if (i_re) exp_i = model[i_addr];
      if (d_re) begin exp_d = dev_or_mem(d_addr); if (is_dev) n_dev_rd++; end
      exp_v = model[16'hC000 + 16'(vga_addr)];
      exp_pulse = 0;
      if (d_we && gwe) begin
        if (!is_dev) begin model[d_addr] = d_din; n_wr++; end
        else begin
          n_dev_wr++;
          if (d_addr == 16'hFE0A) begin m_tir = d_din; exp_pulse = 1; end
          if (d_addr == 16'hFE0E) m_leds = d_din[7:0];
          if (d_addr == 16'hFE10) m_sevseg = d_din;
        end
      end
      @(posedge clk); #1;
      chk("i_dout", i_dout, exp_i);
      chk("d_dout", d_dout, exp_d);
      chk("vga_data", vga_data, exp_v); n_vga++;
      chk("tir", tir, m_tir);
      chk("leds", {8'd0, leds}, {8'd0, m_leds});
      chk("sevseg", sevseg, m_sevseg);
      chk("tir_we", {15'd0, tir_we}, {15'd0, exp_pulse});
    end
    checks++; if (n_dev_rd == 0 || n_dev_wr == 0 || n_wr == 0 || n_vga == 0) failures++;
    $display("device reads %0d, device writes %0d, memory writes %0d", n_dev_rd, n_dev_wr, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
