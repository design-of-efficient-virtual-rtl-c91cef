// route_compute: routing computation (RC) for a head flit.
//
// The output port of a packet is carried in the three least significant
// bits of its head flit: 3'b001 routes to port 1, 3'b010 to port 2 and so
// on to 3'b101 for port P = 5. The block decodes that field into a one-hot
// port vector and a 0-based port index, and flags codes that name no port
// (000, 110, 111) as invalid. Purely combinational.
//
// The field position and code values follow the router's description; what
// happens to a packet with an invalid code (the router drops it) is this
// design's choice.
module route_compute #(
  parameter int unsigned P      = 5,
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned DEST_W = 3
) (
  input  logic [FLIT_W-1:0]    flit,
  output logic                 valid,     // code names an existing port
  output logic [P-1:0]         port_oh,   // one-hot output port
  output logic [$clog2(P)-1:0] port_idx   // 0-based output port
);

  logic [DEST_W-1:0] code;
  assign code = flit[DEST_W-1:0];

  always_comb begin
    valid    = (code >= DEST_W'(1)) && (code <= DEST_W'(P));
    port_oh  = '0;
    port_idx = '0;
    if (valid) begin
      port_idx = $clog2(P)'(code - DEST_W'(1));
      port_oh[port_idx] = 1'b1;
    end
  end

endmodule
