// tb_scratchpad: random reads and byte-masked writes on both ports of the dual-port
// scratchpad, checked against a word-array model: read data one cycle after the
// enable, held while the port is idle, writes from either port visible to the other,
// and old data returned when the other port writes the same word in the same cycle.
module tb_scratchpad;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_en, b_en;
  logic [3:0]  a_we, b_we;
  logic [31:0] a_addr, b_addr, a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  scratchpad #(.WORDS(64)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [64];
  logic [31:0] exp_a, exp_b;
  logic        chk_a, chk_b;

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 4'hf; b_addr = i * 4; b_wdata = i * 32'h01010101;
      model[i] = b_wdata;
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    chk_a = 0; chk_b = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // results of the previous cycle
      if (chk_a) begin checks++; if (a_rdata != exp_a) failures++; end
      if (chk_b) begin checks++; if (b_rdata != exp_b) failures++; end
      a_en = $urandom % 2; b_en = $urandom % 2;
      a_addr = ($urandom % 64) * 4; b_addr = ($urandom % 64) * 4;
      if (n % 5 == 0) b_addr = a_addr;
      a_we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      b_we = ($urandom % 2) ? 4'($urandom) : 4'h0;
      if (a_addr == b_addr) b_we = 4'h0;     // no simultaneous writes to one word
      a_wdata = $urandom; b_wdata = $urandom;
      if (a_en) exp_a = model[a_addr / 4];
      if (b_en) exp_b = model[b_addr / 4];
      chk_a |= a_en; chk_b |= b_en;          // idle ports must hold their data
      for (int i = 0; i < 4; i++) begin
        if (a_en && a_we[i]) model[a_addr / 4][8*i +: 8] = a_wdata[8*i +: 8];
        if (b_en && b_we[i]) model[b_addr / 4][8*i +: 8] = b_wdata[8*i +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
