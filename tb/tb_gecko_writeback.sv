// tb_gecko_writeback: drives the five result streams of Writeback with random valid
// patterns and holds each offered result until it is accepted. Checks that at most
// one stream is accepted per cycle, that the lowest-numbered valid stream wins, that
// every accepted result appears on the register-file write port exactly one cycle
// later, and that each stream's results come out complete and in order.
module tb_gecko_writeback;
  import gecko_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              in_valid  [5];
  logic              in_ready  [5];
  gecko_reg_result_t in_result [5];
  logic              out_valid;
  gecko_reg_result_t out_result;
  int checks = 0, failures = 0;
  int sent [5], accepted_total;

  gecko_writeback #(.STREAMS(5)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gecko_reg_result_t expect_q;
  logic expect_valid;
  int   nacc, first;

  initial begin
    foreach (in_valid[i]) begin in_valid[i] = 0; in_result[i] = '0; sent[i] = 0; end
    expect_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        if (!in_valid[i] && ($urandom % 3) == 0) begin
          in_valid[i] = 1;
          in_result[i] = '{rd: 5'(i * 6 + sent[i] % 6), value: {8'(i), 24'(sent[i])}, write: 1'b1};
        end
      end
      #1;
      nacc = 0; first = -1;
      for (int i = 0; i < 5; i++) begin
        if (in_valid[i] && first < 0) first = i;
        if (in_ready[i]) nacc++;
      end
      checks++;
      if (nacc != (first >= 0 ? 1 : 0) || (first >= 0 && !in_ready[first])) failures++;
      @(posedge clk);
      // registered write port shows last cycle's choice
      checks++;
      if (out_valid != expect_valid || (expect_valid && out_result != expect_q)) failures++;
      expect_valid = first >= 0;
      if (first >= 0) begin
        expect_q = in_result[first];
        if (in_result[first].value != {8'(first), 24'(sent[first])}) failures++;
        sent[first]++;
        accepted_total++;
        #1 in_valid[first] = 0;
      end
    end
    checks++;
    if (sent[4] == 0 || accepted_total < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
