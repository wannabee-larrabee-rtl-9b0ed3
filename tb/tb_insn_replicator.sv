// tb_insn_replicator: connects the replicator to four small behavioural memories and
// checks that each write reaches exactly the cores selected by the mask, with the same
// address, data and byte enables, and that a read returns the lowest-numbered selected
// core's word one cycle later.
module tb_insn_replicator;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          req_en;
  logic [3:0]    req_we;
  logic [31:0]   req_addr, req_wdata, rdata;
  logic [N-1:0]  req_mask;
  logic          core_en    [N];
  logic [3:0]    core_we    [N];
  logic [31:0]   core_addr  [N];
  logic [31:0]   core_wdata [N];
  logic [31:0]   core_rdata [N];
  int checks = 0, failures = 0;

  insn_replicator #(.NCORES(N)) dut (.*);

  logic [31:0] mem [N][16];
  for (genvar c = 0; c < N; c++) begin : g_mem
    always_ff @(posedge clk) if (core_en[c]) begin
      core_rdata[c] <= mem[c][core_addr[c][5:2]];
      if (core_we[c] == 4'hf) mem[c][core_addr[c][5:2]] <= core_wdata[c];
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [N][16];
  int first;

  initial begin
    req_en = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_mask = 0;
    for (int c = 0; c < N; c++) for (int i = 0; i < 16; i++) begin mem[c][i] = 0; model[c][i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      req_en = 1;
      req_mask = N'($urandom);
      if (req_mask == 0) req_mask = 1;
      req_addr = ($urandom % 16) * 4;
      if ($urandom % 2) begin
        req_we = 4'hf; req_wdata = $urandom;
        for (int c = 0; c < N; c++) if (req_mask[c]) model[c][req_addr / 4] = req_wdata;
        #1;
        for (int c = 0; c < N; c++) begin
          checks++;
          if (core_en[c] != req_mask[c] || (core_en[c] && (core_wdata[c] != req_wdata || core_addr[c] != req_addr))) failures++;
        end
      end else begin
        req_we = 4'h0;
        first = 0;
        while (!req_mask[first]) first++;
        @(negedge clk);
        req_en = 0;
        checks++;
        if (rdata != model[first][req_addr / 4]) begin failures++; $display("read core %0d", first); end
      end
    end
    @(negedge clk);
    req_en = 0;
    for (int c = 0; c < N; c++) for (int i = 0; i < 16; i++) begin
      checks++;
      if (mem[c][i] != model[c][i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
