// tb_input_port: virtual-channel input buffer.
//
// Part 1 streams three flits into VC 0 with the read side always granting
// VC 0, and checks that each appears at data_out exactly two clocks after
// the clock edge that samples it (present in cycle t, out in t+2: three
// cycles in the port) in order, with a credit for VC 0 each time it leaves.
// Part 2 writes random flits into random VCs (respecting DEPTH credits per
// VC) and reads random VCs at random; a queue per VC is the reference for
// order, data, type, head_valid and credit return.
module tb_input_port;
  localparam int V = 4, W = 16, D = 4;
  logic clk = 1'b0, rst;
  logic en, gr, credit_valid, valid_out;
  logic [1:0] sel, sel_out, credit_vc, type_in, type_out;
  logic [W-1:0] data_in, data_out;
  logic [V-1:0] head_valid;
  logic [V-1:0][1:0] head_type;
  logic [V-1:0][W-1:0] head_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  input_port #(.V(V), .FLIT_W(W), .DEPTH(D)) dut (.clk(clk), .rst(rst),
    .en(en), .sel(sel), .type_in(type_in), .data_in(data_in),
    .credit_valid(credit_valid), .credit_vc(credit_vc),
    .sel_out(sel_out), .gr(gr), .valid_out(valid_out), .type_out(type_out), .data_out(data_out),
    .head_valid(head_valid), .head_type(head_type), .head_data(head_data));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] q [V][$];
  int credits [V];

  initial begin
    int t_in [3];
    logic [15:0] vals [3];
    int got;
    vals = '{16'h1234, 16'h4567, 16'h0001};
    rst = 1; en = 0; gr = 0; sel = 0; sel_out = 0; type_in = 0; data_in = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // ---- part 1: latency
    gr = 1; sel_out = 0;
    got = 0;
    for (int c = 0; c < 10; c++) begin
      if (valid_out && got < 3) begin
        checks++;
        if (data_out !== vals[got] || cycle - t_in[got] != 2 || !credit_valid || credit_vc != 0) begin
          failures++;
          $display("FAIL part1 flit %0d data %h latency %0d", got, data_out, cycle - t_in[got]);
        end
        got++;
      end
      en = (c < 3);
      sel = 0; type_in = 2'b11;
      if (c < 3) begin
        data_in = vals[c];
        t_in[c] = cycle;         // sampled at the next edge
      end
      @(posedge clk); #1;
    end
    en = 0;
    checks++;
    if (got != 3) begin failures++; $display("FAIL part1 got %0d", got); end
    gr = 0;
    repeat (2) @(posedge clk);
    #1;
    // ---- part 2: random traffic
    for (int v = 0; v < V; v++) credits[v] = D;
    for (int n = 0; n < 4000; n++) begin
      logic [17:0] e;
      int wv, rv;
      // read side: random VC, random grant
      rv = $urandom_range(0, V - 1);
      sel_out = 2'(rv);
      gr = ($urandom_range(0, 2) != 0);
      #1;
      for (int v = 0; v < V; v++) begin
        checks++;
        if (head_valid[v] !== (q[v].size() != 0) ||
            (q[v].size() != 0 && {head_type[v], head_data[v]} !== q[v][0])) begin
          failures++; $display("FAIL part2 n=%0d vc %0d head", n, v);
        end
      end
      checks++;
      if (credit_valid !== (gr && q[rv].size() != 0) || (credit_valid && credit_vc != 2'(rv))) begin
        failures++; $display("FAIL part2 credit n=%0d", n);
      end
      if (gr && q[rv].size() != 0) begin
        void'(q[rv].pop_front());
        credits[rv]++;
      end
      // write side: random VC if it has a credit
      wv = $urandom_range(0, V - 1);
      en = ($urandom_range(0, 1) == 1) && credits[wv] > 0;
      sel = 2'(wv);
      type_in = 2'($urandom);
      data_in = 16'($urandom);
      e = {type_in, data_in};
      if (en) credits[wv]--;
      @(posedge clk);
      #1;
      gr = 0;
      // the flit written at this edge reaches its FIFO at the next one
      if (en) begin
        en = 0;
        @(posedge clk);   // one idle write cycle while it moves, reads paused
        #1;
        q[wv].push_back(e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
