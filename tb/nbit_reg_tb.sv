// nbit_reg_tb: checks the gated register against a software model.
// Random d, we, gwe and rst on every edge, with a non-zero reset value; the
// register must load RESET_VALUE on rst, d only when both enables are high,
// and hold otherwise.
module nbit_reg_tb;
  localparam int N = 16;
  localparam logic [N-1:0] RV = 16'h8200;
  logic clk = 0, rst, we, gwe;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  nbit_reg #(.N(N), .RESET_VALUE(RV)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 'x;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rst = (i < 2) || ($urandom_range(0, 30) == 0);
      we  = $urandom_range(0, 1) == 1;
      gwe = $urandom_range(0, 1) == 1;
      d   = N'($urandom);
      @(posedge clk);
      if (rst) model = RV;
      else if (we && gwe) begin model = d; loads++; end
      else holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q %h expected %h", i, q, model);
      end
    end
    checks++; if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
