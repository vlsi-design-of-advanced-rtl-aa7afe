// tb_cdc_handshake: sends 300 random words from a 10 ns clock domain to a 13 ns clock
// domain with random valid and ready stalls and checks that every word arrives once, in
// order, unchanged, and that dst_valid never drops before the word is taken.
module tb_cdc_handshake;
  localparam int W = 40;
  logic src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0;
  logic src_valid = 0, src_ready, dst_valid, dst_ready = 0;
  logic [W-1:0] src_data = 0, dst_data;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, nrecv = 0;
  always #5 src_clk = ~src_clk;
  always #6.5 dst_clk = ~dst_clk;
  cdc_handshake #(.W(W)) dut (.*);
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #22 src_rst_n = 1; dst_rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge src_clk);
      while ($urandom_range(0, 3) == 0) @(negedge src_clk);
      src_valid = 1;
      src_data = {$urandom, $urandom};
      sent.push_back(src_data);
      @(posedge src_clk);
      while (!src_ready) @(posedge src_clk);
      #1 src_valid = 0;
    end
  end
  // everything on the destination side is sampled on the falling edge, where it is stable
  logic was_valid = 0;
  logic [W-1:0] was_data = 0;
  always @(negedge dst_clk) begin
    if (was_valid) begin
      checks++;
      if (!dst_valid || dst_data !== was_data) begin failures++; $display("FAIL stall hold"); end
    end
    dst_ready = ($urandom_range(0, 2) != 0);
    was_valid = dst_valid && !dst_ready;
    was_data = dst_data;
    if (dst_valid && dst_ready) begin
      checks++;
      if (sent.size() == 0 || dst_data !== sent[0]) begin
        failures++; $display("FAIL word %0d", nrecv);
      end else void'(sent.pop_front());
      nrecv++;
      if (nrecv == 300) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
