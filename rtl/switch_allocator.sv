// switch_allocator: one fixed-priority arbiter per output port.
//
// Each input presents a request and the 0-based index of the output it
// wants. The block splits these into one request vector per output and
// hands each vector to its own fixed_priority_arbiter (input 1 highest
// priority). Because the arbiters are Moore machines, grant[o][i] is high
// one clock after input i asked for output o. A grant is only useful while
// input i still asks for the same output, so the block also gives
// match[o][i] = grant[o][i] & req[i] & (dest[i] == o), and per input
// in_match[i], the OR of match over all outputs (at most one is set).
//
// One arbiter per output, fixed priority, follows the router's crossbar
// description; the match qualification is this design's choice, made so a
// grant that arrives after the request has moved on moves nothing.
module switch_allocator #(
  parameter int unsigned P = 5
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [P-1:0]                  req,
  input  logic [P-1:0][$clog2(P)-1:0]   dest,
  output logic [P-1:0][P-1:0]           grant,    // [output][input]
  output logic [P-1:0][P-1:0]           match,    // [output][input]
  output logic [P-1:0]                  in_match  // per input
);

  localparam int unsigned PW = $clog2(P);

  logic [P-1:0][P-1:0] out_req;  // [output][input]

  always_comb begin
    for (int o = 0; o < P; o++)
      for (int i = 0; i < P; i++)
        out_req[o][i] = req[i] && (dest[i] == PW'(o));
  end

  for (genvar o = 0; o < P; o++) begin : g_arb
    fixed_priority_arbiter #(.N(P)) u_arb (
      .clk  (clk),
      .rst  (rst),
      .req  (out_req[o]),
      .grant(grant[o])
    );
  end

  always_comb begin
    in_match = '0;
    for (int o = 0; o < P; o++) begin
      match[o] = grant[o] & out_req[o];
      in_match |= match[o];
    end
  end

endmodule
