// vc_router: five-port virtual-channel router with speculative switch
// allocation.
//
// Each port (1..5, used as East, West, North, South, Local) has an
// input_port holding four virtual-channel FIFOs. Packets are made of a
// head flit, body flits and a tail flit (or one single flit); the three
// least significant bits of the head flit name the output port (001 for
// port 1 ... 101 for port 5). Body and tail flits follow the head.
//
// The main idea is speculation. In a plain virtual-channel router a head
// flit first wins a downstream virtual channel (VA) and only then asks for
// the crossbar (SA). Here both requests are made in the same cycle: the
// head flit asks route_compute for its output, asks the vc_allocator for a
// VC at that output and asks that output's switch arbiter for the crossbar,
// all at once. The switch arbiters answer one clock later; the VC
// allocator answers at once. A flit moves in a cycle in which its input
// holds the switch grant for its output and it holds, or is being given, a
// downstream VC with a credit. So a head that wins both crosses on the next
// cycle; a head whose input still holds the switch grant from the previous
// flit crosses in the very cycle its VC is allocated, which lets one input
// stream packet after packet at one flit per clock; a head that wins the
// switch but no VC loses that switch cycle (a mis-speculation) and asks
// again; a head that wins a VC but not the switch keeps the VC and asks
// for the switch again, now without speculating.
//
// Per input port, one VC is offered to the crossbar at a time. The offered
// VC stays the same while its flit is eligible, so that a switch grant,
// which arrives one clock after the request, still finds the same flit;
// after a tail flit leaves, the offer moves on round-robin. A flit is
// eligible when it holds a downstream VC with a credit, or is a head flit
// whose output has a VC not yet taken, or belongs to a packet being
// dropped. Packets whose head names no port (000, 110, 111) are discarded
// and reported on `drop`.
//
// Timing on an idle router: a flit presented on in_* in cycle t sits in the
// input register in t+1, at the head of its VC FIFO in t+2 (route, VC and
// switch requests), crosses the crossbar in t+3 and is on out_* in t+4.
// One flit per output per cycle. Credits: a VC may be sent to only while
// the sender holds a credit for it; credit_out_* returns one credit per
// flit leaving an input FIFO, credit_in_* takes credits from downstream
// (4 per VC after reset).
//
// Five ports, 16-bit flits, the 3-bit destination field, the input port,
// VC and switch allocation in parallel, the 5x5 crossbar with one
// fixed-priority arbiter per output follow the router's description. The
// flit type signal, the number of VCs and buffer depth, credit flow
// control details, the VC offer policy and dropping of unroutable packets
// are this design's choices.
module vc_router #(
  parameter int unsigned P      = noc_pkg::NUM_PORTS,
  parameter int unsigned V      = noc_pkg::NUM_VCS,
  parameter int unsigned FLIT_W = noc_pkg::FLIT_W,
  parameter int unsigned DEPTH  = noc_pkg::BUF_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst,
  // input links
  input  logic [P-1:0]                in_valid,
  input  logic [P-1:0][$clog2(V)-1:0] in_vc,
  input  logic [P-1:0][1:0]           in_type,
  input  logic [P-1:0][FLIT_W-1:0]    in_flit,
  output logic [P-1:0]                credit_out_valid,
  output logic [P-1:0][$clog2(V)-1:0] credit_out_vc,
  // output links
  output logic [P-1:0]                out_valid,
  output logic [P-1:0][$clog2(V)-1:0] out_vc,
  output logic [P-1:0][1:0]           out_type,
  output logic [P-1:0][FLIT_W-1:0]    out_flit,
  input  logic [P-1:0]                credit_in_valid,
  input  logic [P-1:0][$clog2(V)-1:0] credit_in_vc,
  // a flit of an unroutable packet was discarded at this input
  output logic [P-1:0]                drop
);

  import noc_pkg::is_head;
  import noc_pkg::is_tail;

  localparam int unsigned PW = $clog2(P);
  localparam int unsigned VW = $clog2(V);
  localparam int unsigned XW = 2 + VW + FLIT_W;   // crossbar payload

  // ---------------------------------------------------------------- inputs
  logic [P-1:0][V-1:0]             head_valid;
  logic [P-1:0][V-1:0][1:0]        head_type;
  logic [P-1:0][V-1:0][FLIT_W-1:0] head_data;
  logic [P-1:0][VW-1:0]            sel;
  logic [P-1:0]                    consume;

  logic [P-1:0]        port_valid_unused;
  logic [P-1:0][1:0]   port_type_unused;
  logic [P-1:0][FLIT_W-1:0] port_data_unused;

  for (genvar i = 0; i < P; i++) begin : g_in
    input_port #(.V(V), .FLIT_W(FLIT_W), .DEPTH(DEPTH)) u_port (
      .clk         (clk),
      .rst         (rst),
      .en          (in_valid[i]),
      .sel         (in_vc[i]),
      .type_in     (in_type[i]),
      .data_in     (in_flit[i]),
      .credit_valid(credit_out_valid[i]),
      .credit_vc   (credit_out_vc[i]),
      .sel_out     (sel[i]),
      .gr          (consume[i]),
      .valid_out   (port_valid_unused[i]),
      .type_out    (port_type_unused[i]),
      .data_out    (port_data_unused[i]),
      .head_valid  (head_valid[i]),
      .head_type   (head_type[i]),
      .head_data   (head_data[i])
    );
  end

  // ------------------------------------------------- routing computation
  logic [P-1:0][V-1:0]         rc_valid;
  logic [P-1:0][V-1:0][PW-1:0] rc_idx;

  for (genvar i = 0; i < P; i++) begin : g_rc_i
    for (genvar v = 0; v < V; v++) begin : g_rc_v
      logic [P-1:0] oh_unused;
      route_compute #(.P(P), .FLIT_W(FLIT_W), .DEST_W(noc_pkg::DEST_W)) u_rc (
        .flit    (head_data[i][v]),
        .valid   (rc_valid[i][v]),
        .port_oh (oh_unused),
        .port_idx(rc_idx[i][v])
      );
    end
  end

  // ------------------------------------------- per input-VC packet state
  logic [P-1:0][VW-1:0]        ptr;       // VC offered last cycle
  logic [P-1:0][V-1:0]         has_vc;    // packet holds a downstream VC
  logic [P-1:0][V-1:0][VW-1:0] ovc;       // that downstream VC
  logic [P-1:0][V-1:0][PW-1:0] route;     // output port of the packet
  logic [P-1:0][V-1:0]         dropping;  // rest of packet is discarded

  // ------------------------------------------- VC allocator interface
  logic [P-1:0]         va_req, va_gnt;
  logic [P-1:0][PW-1:0] va_port;
  logic [P-1:0][VW-1:0] va_vc;
  logic [P-1:0]         use_valid, rel_valid;
  logic [P-1:0][VW-1:0] use_vc, rel_vc;
  logic [P-1:0][V-1:0]  credit_ok;
  logic [P-1:0]         free_any;

  // ------------------------------------------------ crossbar interface
  logic [P-1:0]         sa_req, allow, xbar_gnt, spec_fail;
  logic [P-1:0][PW-1:0] f_dest;
  logic [P-1:0][XW-1:0] payload;
  logic [P-1:0]         x_valid;
  logic [P-1:0][XW-1:0] x_data;

  logic [P-1:0]         sel_valid, f_head, f_tail, f_drop;
  logic [P-1:0][VW-1:0] f_ovc;
  logic [P-1:0][V-1:0]  elig;

  always_comb begin
    for (int i = 0; i < P; i++) begin
      // eligibility of each VC's oldest flit
      for (int v = 0; v < V; v++) begin
        elig[i][v] = head_valid[i][v] &&
                     ( dropping[i][v]
                     || (has_vc[i][v] && credit_ok[route[i][v]][ovc[i][v]])
                     || (!has_vc[i][v] && is_head(head_type[i][v]) &&
                         (!rc_valid[i][v] || free_any[rc_idx[i][v]])) );
      end
      // keep offering the same VC while it is eligible, else round-robin
      sel[i] = ptr[i];
      if (!elig[i][ptr[i]]) begin
        for (int k = V - 1; k >= 1; k--) begin
          if (elig[i][VW'((32'(ptr[i]) + k) % V)])
            sel[i] = VW'((32'(ptr[i]) + k) % V);
        end
      end
      sel_valid[i] = elig[i][sel[i]];
      f_head[i]    = is_head(head_type[i][sel[i]]);
      f_tail[i]    = is_tail(head_type[i][sel[i]]);
      f_drop[i]    = dropping[i][sel[i]] ||
                     (!has_vc[i][sel[i]] && !rc_valid[i][sel[i]]);
      f_dest[i]    = has_vc[i][sel[i]] ? route[i][sel[i]] : rc_idx[i][sel[i]];

      // speculative: switch and VC requests are raised together
      sa_req[i]  = sel_valid[i] && !f_drop[i];
      va_req[i]  = sa_req[i] && f_head[i] && !has_vc[i][sel[i]];
      va_port[i] = rc_idx[i][sel[i]];
      // the VC is used in the cycle it is won: a head whose switch grant
      // is already in place leaves in the same cycle as its VC allocation
      f_ovc[i]   = has_vc[i][sel[i]] ? ovc[i][sel[i]] : va_vc[i];
      allow[i]   = (has_vc[i][sel[i]] || va_gnt[i]) && credit_ok[f_dest[i]][f_ovc[i]];
      payload[i] = {head_type[i][sel[i]], f_ovc[i], head_data[i][sel[i]]};

      consume[i] = xbar_gnt[i] || (sel_valid[i] && f_drop[i]);
      drop[i]    = sel_valid[i] && f_drop[i];
    end
  end

  // credit spending and VC release, per output port
  always_comb begin
    use_valid = '0;
    use_vc    = '0;
    rel_valid = '0;
    rel_vc    = '0;
    for (int i = 0; i < P; i++) begin
      if (xbar_gnt[i]) begin
        use_valid[f_dest[i]] = 1'b1;
        use_vc[f_dest[i]]    = f_ovc[i];
        rel_valid[f_dest[i]] = f_tail[i];
        rel_vc[f_dest[i]]    = f_ovc[i];
      end
    end
  end

  vc_allocator #(.P(P), .V(V), .DEPTH(DEPTH)) u_va (
    .clk            (clk),
    .rst            (rst),
    .va_req         (va_req),
    .va_port        (va_port),
    .va_gnt         (va_gnt),
    .va_vc          (va_vc),
    .use_valid      (use_valid),
    .use_vc         (use_vc),
    .rel_valid      (rel_valid),
    .rel_vc         (rel_vc),
    .credit_in_valid(credit_in_valid),
    .credit_in_vc   (credit_in_vc),
    .credit_ok      (credit_ok),
    .free_any       (free_any)
  );

  crossbar #(.P(P), .W(XW)) u_xbar (
    .clk         (clk),
    .rst         (rst),
    .in_req      (sa_req),
    .in_dest     (f_dest),
    .in_allow    (allow),
    .in_data     (payload),
    .in_gnt      (xbar_gnt),
    .in_spec_fail(spec_fail),
    .out_valid   (x_valid),
    .out_data    (x_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      has_vc   <= '0;
      ovc      <= '0;
      route    <= '0;
      dropping <= '0;
    end else begin
      for (int i = 0; i < P; i++) begin
        ptr[i] <= (consume[i] && f_tail[i]) ? VW'((32'(sel[i]) + 1) % V) : sel[i];
        if (xbar_gnt[i] && f_tail[i]) begin
          has_vc[i][sel[i]] <= 1'b0;
        end else if (va_gnt[i]) begin
          has_vc[i][sel[i]] <= 1'b1;
          ovc[i][sel[i]]    <= va_vc[i];
          route[i][sel[i]]  <= rc_idx[i][sel[i]];
        end
        if (drop[i]) dropping[i][sel[i]] <= !f_tail[i];
      end
    end
  end

  always_comb begin
    for (int o = 0; o < P; o++) begin
      out_valid[o] = x_valid[o];
      out_type[o]  = x_data[o][XW-1 -: 2];
      out_vc[o]    = x_data[o][FLIT_W +: VW];
      out_flit[o]  = x_data[o][FLIT_W-1:0];
    end
  end

endmodule
