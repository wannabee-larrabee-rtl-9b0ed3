// tb_reset_controller: checks that every core is held in reset after system reset,
// that writes of the mask release and re-assert individual cores one cycle later,
// and that the mask reads back.
module tb_reset_controller;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         we;
  logic [N-1:0] wdata, mask, core_rst;
  int checks = 0, failures = 0;

  reset_controller #(.NCORES(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] state;
  initial begin
    we = 0; wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (core_rst != '1 || mask != '1) failures++;
    state = '1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      wdata = N'($urandom);
      @(posedge clk);
      #1;
      if (we) state = wdata;
      we = 0;
      checks++;
      if (core_rst != state || mask != state) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
