// llc_stream_arb: round-robin arbiter between the render caches and the LLC.
//
// Each of the NUM_PORTS render caches (one per graphics stream) offers a
// request with a valid/ready handshake. The arbiter forwards one of them to
// the cache controller; the port granted last has the lowest priority in the
// next round, so no stream is starved. The index of the granted port is the
// request's stream identity. A port's request is taken when its req_ready and
// req_valid are both high in the same cycle.
//
// That every stream's render cache connects to the shared LLC follows the
// block diagram of the LLC interface; the round-robin order and the
// handshake are this design's choices.
module llc_stream_arb #(
  parameter int unsigned NUM_PORTS = 7,
  localparam int unsigned PW       = $clog2(NUM_PORTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] req_valid,
  output logic [NUM_PORTS-1:0] req_ready,
  output logic                 out_valid,
  output logic [PW-1:0]        out_port,
  input  logic                 out_ready
);

  logic [PW-1:0] last_q;

  always_comb begin
    out_valid = 1'b0;
    out_port  = '0;
    // Scan the ports starting just after the one granted last.
    for (int k = NUM_PORTS; k >= 1; k--) begin
      int unsigned p;
      p = (int'(last_q) + k) % NUM_PORTS;
      if (req_valid[p]) begin
        out_valid = 1'b1;
        out_port  = PW'(p);
      end
    end
    req_ready = '0;
    if (out_valid && out_ready) req_ready[out_port] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                      last_q <= PW'(NUM_PORTS - 1);
    else if (out_valid && out_ready) last_q <= out_port;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready));
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> req_valid[out_port]);

endmodule
