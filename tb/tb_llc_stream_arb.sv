// tb_llc_stream_arb: round-robin order and handshake of the stream arbiter.
//
// Random request patterns and random downstream stalls are applied; each
// cycle the grant is compared with a reference that searches from the port
// after the one last granted. With every port requesting all the time, each
// port must be granted once in every NUM_PORTS grants.
module tb_llc_stream_arb;
  localparam int unsigned N = 7;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] req_valid = '0, req_ready;
  logic         out_valid, out_ready = 0;
  logic [2:0]   out_port;

  llc_stream_arb #(.NUM_PORTS(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int last = N - 1;
  int grants [N];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int exp_p;
      @(negedge clk);
      req_valid = (n < 3000) ? N'($urandom) : '1;
      out_ready = (n < 3000) ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (n == 3000) grants = '{default: 0};
      #1;
      exp_p = -1;
      for (int k = 1; k <= N; k++)
        if (exp_p < 0 && req_valid[(last + k) % N]) exp_p = (last + k) % N;
      checks++;
      if (out_valid !== (exp_p >= 0) || (exp_p >= 0 && out_port !== 3'(exp_p)) ||
          req_ready !== ((exp_p >= 0 && out_ready) ? N'(1) << exp_p : '0)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d v=%b exp %0d got %0d/%0d r=%b", n, req_valid, exp_p, out_valid, out_port, req_ready);
      end
      if (exp_p >= 0 && out_ready) begin
        last = exp_p;
        grants[exp_p]++;
      end
    end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (grants[p] < 3000 / N - 1 || grants[p] > 3000 / N + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
