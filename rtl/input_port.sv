// input_port: virtual-channel input buffer of one router port.
//
// A flit arriving on the link (en high, sel naming its virtual channel) is
// first captured in an input register. On the next clock the VC identifier
// steers it into the FIFO of that virtual channel (one flit_fifo per VC).
// The oldest flit of every VC is visible on head_*; the one of the VC named
// by sel_out is also driven on data_out/type_out/valid_out. Raising gr
// removes that flit (the crossbar has taken it) and sends one credit for
// VC sel_out back upstream on credit_valid/credit_vc in the same cycle.
//
// Timing: a flit presented in cycle t is in the input register in t+1 and
// at the head of its FIFO in t+2, so on an idle port it spends three clock
// cycles (t, t+1, t+2) in the port before it can leave. Upstream must hold
// one credit per flit sent on a VC (DEPTH credits per VC after reset), so a
// FIFO can never overflow; an assertion checks this.
//
// The input register, the per-VC buffers selected by a VC identifier, the
// credit output and the three-cycle crossing follow the router's
// description. Four VCs (a 2-bit channel select), four flits per VC,
// show-ahead FIFOs and a synchronous active-high reset are this design's
// choices.
module input_port #(
  parameter int unsigned V      = 4,
  parameter int unsigned FLIT_W = 16,
  parameter int unsigned DEPTH  = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  // link side
  input  logic                       en,
  input  logic [$clog2(V)-1:0]       sel,
  input  logic [1:0]                 type_in,
  input  logic [FLIT_W-1:0]          data_in,
  output logic                       credit_valid,
  output logic [$clog2(V)-1:0]       credit_vc,
  // router side
  input  logic [$clog2(V)-1:0]       sel_out,
  input  logic                       gr,
  output logic                       valid_out,
  output logic [1:0]                 type_out,
  output logic [FLIT_W-1:0]          data_out,
  output logic [V-1:0]               head_valid,
  output logic [V-1:0][1:0]          head_type,
  output logic [V-1:0][FLIT_W-1:0]   head_data
);

  localparam int unsigned VW = $clog2(V);
  localparam int unsigned EW = FLIT_W + 2;

  // input register
  logic              ir_valid;
  logic [VW-1:0]     ir_vc;
  logic [EW-1:0]     ir_entry;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_valid <= 1'b0;
      ir_vc    <= '0;
      ir_entry <= '0;
    end else begin
      ir_valid <= en;
      ir_vc    <= sel;
      ir_entry <= {type_in, data_in};
    end
  end

  logic [V-1:0]         fifo_empty, fifo_full;
  logic [V-1:0][EW-1:0] fifo_head;
  logic                 pop;

  assign pop = gr && head_valid[sel_out];

  for (genvar v = 0; v < V; v++) begin : g_vc
    logic [$clog2(DEPTH+1)-1:0] count_unused;
    flit_fifo #(.W(EW), .DEPTH(DEPTH)) u_fifo (
      .clk    (clk),
      .rst    (rst),
      .wr_en  (ir_valid && (ir_vc == VW'(v))),
      .wr_data(ir_entry),
      .rd_en  (pop && (sel_out == VW'(v))),
      .rd_data(fifo_head[v]),
      .empty  (fifo_empty[v]),
      .full   (fifo_full[v]),
      .count  (count_unused)
    );
    assign head_valid[v] = !fifo_empty[v];
    assign head_type[v]  = fifo_head[v][EW-1 -: 2];
    assign head_data[v]  = fifo_head[v][FLIT_W-1:0];
  end

  assign valid_out    = head_valid[sel_out];
  assign type_out     = head_type[sel_out];
  assign data_out     = head_data[sel_out];
  assign credit_valid = pop;
  assign credit_vc    = sel_out;

  assert property (@(posedge clk) disable iff (rst)
                   ir_valid |-> !fifo_full[ir_vc])
    else $error("input_port: flit sent without a credit");

endmodule
