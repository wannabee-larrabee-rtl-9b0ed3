// tb_basilisk_divsqrt: checks the iterative significand divider and square root
// against integer references: q = floor(ma*2^26/mb) with the remainder as sticky, and
// r = floor(sqrt(rad)) with sticky = (r*r != rad). Also checks the latency (done rises 27 clock edges after the edge that samples start)
// from start to done and that busy blocks a second start.
module tb_basilisk_divsqrt;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        start, is_sqrt, busy, done, sticky;
  logic [23:0] ma, mb;
  logic [53:0] rad;
  logic [26:0] result;
  int checks = 0, failures = 0;

  basilisk_divsqrt dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit sq, output int lat);
    @(negedge clk);
    is_sqrt = sq; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  longint unsigned num, q, r, rr;
  int lat;

  initial begin
    start = 0; is_sqrt = 0; ma = 0; mb = 0; rad = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      ma = {1'b1, 23'($urandom)};
      mb = {1'b1, 23'($urandom)};
      if (n == 1) mb = ma;
      run(0, lat);
      num = longint'(ma) << 26;
      q = num / longint'(mb);
      checks++;
      if (result != 27'(q) || sticky != ((num % longint'(mb)) != 0)) begin
        failures++;
        if (failures < 10) $display("div %h/%h got %h/%b exp %h", ma, mb, result, sticky, q);
      end
      if (n == 0) begin checks++; if (lat != 28) begin failures++; $display("latency %0d", lat); end end

      rad = {$urandom, $urandom} >> 10;
      rad[53] = n[0]; rad[52] = !n[0];
      if (n == 2) rad = 54'd1 << 52;
      run(1, lat);
      r = longint'($floor($sqrt(real'(rad))));
      while (r * r > rad) r--;
      while ((r + 1) * (r + 1) <= rad) r++;
      checks++;
      if (result != 27'(r) || sticky != (r * r != rad)) begin
        failures++;
        if (failures < 10) $display("sqrt %h got %h exp %h", rad, result, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
