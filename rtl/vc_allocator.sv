// vc_allocator: virtual-channel allocation and credit bookkeeping.
//
// For every output port the block keeps, per downstream virtual channel,
// a busy bit (the VC belongs to a packet whose tail has not left yet) and
// a credit counter (free slots in the downstream router's buffer for that
// VC, DEPTH after reset). Each cycle, for every output o, the
// highest-priority input (lowest index) that asks for a VC at o is given
// the lowest-numbered VC of o that is not busy; that VC becomes busy on the
// next clock. At most one VC per output is handed out per cycle. The grant
// (va_gnt, va_vc) is combinational, so the router can use it in the same
// cycle and record it at the same clock edge. A release of the VC being
// allocated in the same cycle wins (the packet got its VC and left).
//
// Bookkeeping inputs, one per output port:
//   use_*       a flit leaves on that VC: one credit is spent
//   rel_*       a tail flit leaves on that VC: the VC is free again
//   credit_in_* the downstream router freed a slot on that VC
// credit_ok[o][v] tells whether VC v of output o has a credit left and
// free_any[o] whether output o has a VC that could be allocated.
//
// VC allocation by head flits only, releasing at the tail, and credits
// coming in from downstream follow the router's description. Fixed
// priority among inputs, lowest-free-VC choice and allocating a VC
// regardless of its credit count (a flit then waits for credit) are this
// design's choices.
module vc_allocator #(
  parameter int unsigned P     = 5,
  parameter int unsigned V     = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst,
  // allocation requests, one per input port
  input  logic [P-1:0]                va_req,
  input  logic [P-1:0][$clog2(P)-1:0] va_port,
  output logic [P-1:0]                va_gnt,
  output logic [P-1:0][$clog2(V)-1:0] va_vc,
  // bookkeeping, one per output port
  input  logic [P-1:0]                use_valid,
  input  logic [P-1:0][$clog2(V)-1:0] use_vc,
  input  logic [P-1:0]                rel_valid,
  input  logic [P-1:0][$clog2(V)-1:0] rel_vc,
  input  logic [P-1:0]                credit_in_valid,
  input  logic [P-1:0][$clog2(V)-1:0] credit_in_vc,
  output logic [P-1:0][V-1:0]         credit_ok,
  output logic [P-1:0]                free_any
);

  localparam int unsigned PW = $clog2(P);
  localparam int unsigned VW = $clog2(V);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [P-1:0][V-1:0]         busy;
  logic [P-1:0][V-1:0][CW-1:0] credits;

  // per-output allocation decision
  logic [P-1:0]         alloc;      // output o hands out a VC this cycle
  logic [P-1:0][VW-1:0] alloc_vc;
  logic [P-1:0][PW-1:0] alloc_in;

  always_comb begin
    va_gnt = '0;
    va_vc  = '0;
    for (int o = 0; o < P; o++) begin
      logic have_in, have_vc;
      have_in     = 1'b0;
      have_vc     = 1'b0;
      alloc_in[o] = '0;
      alloc_vc[o] = '0;
      for (int i = P - 1; i >= 0; i--) begin
        if (va_req[i] && va_port[i] == PW'(o)) begin
          have_in     = 1'b1;
          alloc_in[o] = PW'(i);
        end
      end
      for (int v = V - 1; v >= 0; v--) begin
        if (!busy[o][v]) begin
          have_vc     = 1'b1;
          alloc_vc[o] = VW'(v);
        end
      end
      alloc[o] = have_in && have_vc;
      if (alloc[o]) begin
        va_gnt[alloc_in[o]] = 1'b1;
        va_vc[alloc_in[o]]  = alloc_vc[o];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0;
      for (int o = 0; o < P; o++)
        for (int v = 0; v < V; v++)
          credits[o][v] <= CW'(DEPTH);
    end else begin
      for (int o = 0; o < P; o++) begin
        for (int v = 0; v < V; v++) begin
          logic spend, gain;
          spend = use_valid[o] && use_vc[o] == VW'(v);
          gain  = credit_in_valid[o] && credit_in_vc[o] == VW'(v);
          credits[o][v] <= credits[o][v] - CW'(spend) + CW'(gain);
          // release wins: a single-flit packet may get its VC and
          // leave on it in the same cycle
          if (rel_valid[o] && rel_vc[o] == VW'(v))
            busy[o][v] <= 1'b0;
          else if (alloc[o] && alloc_vc[o] == VW'(v))
            busy[o][v] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < P; o++) begin
      free_any[o] = ~&busy[o];
      for (int v = 0; v < V; v++) credit_ok[o][v] = (credits[o][v] != '0);
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (rst)
                     use_valid[o] |-> credit_ok[o][use_vc[o]])
      else $error("vc_allocator: flit sent without a credit");
    assert property (@(posedge clk) disable iff (rst)
                     credit_in_valid[o] && !(use_valid[o] && use_vc[o] == credit_in_vc[o])
                     |-> credits[o][credit_in_vc[o]] != CW'(DEPTH))
      else $error("vc_allocator: more credits returned than sent");
  end

endmodule
