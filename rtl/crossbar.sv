// crossbar: P x P crossbar switch with its per-output arbiters.
//
// Every input offers a payload, the index of the output it is routed to
// and a request. A switch_allocator (one fixed-priority arbiter per output)
// decides which input owns each output. An input whose grant matches its
// current request moves its payload through the crossbar only if its
// in_allow bit is also set; in the router that bit says the packet holds
// (or is given in this cycle) a downstream virtual channel with a free
// buffer slot. A request therefore
// competes for the switch before it is known to be allowed to move; a
// grant that finds in_allow low is a lost (mis-speculated) switch cycle and
// is reported on in_spec_fail.
//
// Timing: request in cycle c, grant state in cycle c+1, the payload is
// switched in cycle c+1 (in_gnt is high that cycle) and appears on the
// registered outputs out_valid/out_data in cycle c+2.
//
// The 5x5 size and arbiters inside the crossbar follow the router's
// description; the allow qualifier and the output register are this
// design's choices.
module crossbar #(
  parameter int unsigned P = 5,
  parameter int unsigned W = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [P-1:0]                in_req,
  input  logic [P-1:0][$clog2(P)-1:0] in_dest,
  input  logic [P-1:0]                in_allow,
  input  logic [P-1:0][W-1:0]         in_data,
  output logic [P-1:0]                in_gnt,       // payload moves this cycle
  output logic [P-1:0]                in_spec_fail, // granted but not allowed
  output logic [P-1:0]                out_valid,
  output logic [P-1:0][W-1:0]         out_data
);

  logic [P-1:0][P-1:0] grant, match;  // [output][input]
  logic [P-1:0]        in_match;

  switch_allocator #(.P(P)) u_sa (
    .clk     (clk),
    .rst     (rst),
    .req     (in_req),
    .dest    (in_dest),
    .grant   (grant),
    .match   (match),
    .in_match(in_match)
  );

  assign in_gnt       = in_match & in_allow;
  assign in_spec_fail = in_match & ~in_allow;

  logic [P-1:0]        sw_valid;
  logic [P-1:0][W-1:0] sw_data;

  always_comb begin
    for (int o = 0; o < P; o++) begin
      sw_valid[o] = 1'b0;
      sw_data[o]  = '0;
      for (int i = 0; i < P; i++) begin
        if (match[o][i] && in_allow[i]) begin
          sw_valid[o] = 1'b1;
          sw_data[o]  = in_data[i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= sw_valid;
      out_data  <= sw_data;
    end
  end

endmodule
