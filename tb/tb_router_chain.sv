// tb_router_chain: two routers joined by one link, credits included.
//
// Output port 1 of router A drives input port 2 of router B, and B's
// credit output for that port goes back to A's credit input for port 1,
// as in two neighbouring routers of a mesh. Every input of A sends
// packets of 1 to 4 flits whose head carries code 001, so they all leave
// A on port 1 and, with the same code, leave B on port 1 too. The
// downstream of B returns credits at random. Packets of one source may
// overtake each other (they can travel on different VCs), flits of one
// packet may not. The test checks that every flit arrives at B's port 1,
// in order within its packet, that a VC of the
// B output carries one packet from head to tail, that the A-to-B link
// never overruns B's buffers (the routers' own assertions) and that the
// credit loop between the routers lets traffic drain completely.
module tb_router_chain;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS, D = BUF_DEPTH;

  logic clk = 1'b0, rst;
  always #5 clk = ~clk;

  // router A
  logic [P-1:0] a_in_valid, a_cout_valid, a_out_valid, a_cin_valid, a_drop;
  logic [P-1:0][1:0] a_in_vc, a_in_type, a_cout_vc, a_out_vc, a_out_type, a_cin_vc;
  logic [P-1:0][15:0] a_in_flit, a_out_flit;
  // router B
  logic [P-1:0] b_in_valid, b_cout_valid, b_out_valid, b_cin_valid, b_drop;
  logic [P-1:0][1:0] b_in_vc, b_in_type, b_cout_vc, b_out_vc, b_out_type, b_cin_vc;
  logic [P-1:0][15:0] b_in_flit, b_out_flit;

  vc_router ra (.clk(clk), .rst(rst),
    .in_valid(a_in_valid), .in_vc(a_in_vc), .in_type(a_in_type), .in_flit(a_in_flit),
    .credit_out_valid(a_cout_valid), .credit_out_vc(a_cout_vc),
    .out_valid(a_out_valid), .out_vc(a_out_vc), .out_type(a_out_type), .out_flit(a_out_flit),
    .credit_in_valid(a_cin_valid), .credit_in_vc(a_cin_vc), .drop(a_drop));

  vc_router rb (.clk(clk), .rst(rst),
    .in_valid(b_in_valid), .in_vc(b_in_vc), .in_type(b_in_type), .in_flit(b_in_flit),
    .credit_out_valid(b_cout_valid), .credit_out_vc(b_cout_vc),
    .out_valid(b_out_valid), .out_vc(b_out_vc), .out_type(b_out_type), .out_flit(b_out_flit),
    .credit_in_valid(b_cin_valid), .credit_in_vc(b_cin_vc), .drop(b_drop));

  // the link: A port 1 (index 0) -> B port 2 (index 1), credits back
  always_comb begin
    b_in_valid = '0; b_in_vc = '0; b_in_type = '0; b_in_flit = '0;
    b_in_valid[1] = a_out_valid[0];
    b_in_vc[1]    = a_out_vc[0];
    b_in_type[1]  = a_out_type[0];
    b_in_flit[1]  = a_out_flit[0];
    a_cin_valid = '0; a_cin_vc = '0;
    a_cin_valid[0] = b_cout_valid[1];
    a_cin_vc[0]    = b_cout_vc[1];
  end

  int checks = 0, failures = 0;
  int upc [P][V];
  int left [P][V], seq [P][V];
  int dso [V];
  int owner [V];
  int sent = 0, got = 0;
  bit gen_on = 0;
  logic [17:0] expq [int][$];      // per packet: flits still expected
  int pkt [P][V];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst)
    for (int i = 0; i < P; i++) if (a_cout_valid[i]) upc[i][a_cout_vc[i]]++;

  // sources on every input of A
  always @(negedge clk) begin
    a_in_valid <= '0;
    if (!rst) for (int i = 0; i < P; i++) begin
      int v;
      logic [1:0] t;
      logic [15:0] d;
      v = $urandom_range(0, V - 1);
      if ($urandom_range(0, 1) == 1 && upc[i][v] > 0 && (gen_on || left[i][v] != 0)) begin
        if (left[i][v] == 0) begin
          pkt[i][v] = (pkt[i][v] + 1) % 64;
          seq[i][v] = 0;
          left[i][v] = $urandom_range(1, 4);
          t = (left[i][v] == 1) ? FT_SINGLE : FT_HEAD;
        end else t = (left[i][v] == 1) ? FT_TAIL : FT_BODY;
        d = {3'(i), 2'(v), 6'(pkt[i][v]), 2'(seq[i][v]), 3'b001};
        seq[i][v]++; left[i][v]--; upc[i][v]--; sent++;
        a_in_valid[i] <= 1'b1; a_in_vc[i] <= 2'(v); a_in_type[i] <= t; a_in_flit[i] <= d;
        expq[key_of(i, v, pkt[i][v])].push_back({t, d});
      end
    end
  end

  // sink behind B port 1, with random credit return
  always @(negedge clk) begin
    b_cin_valid <= '0;
    b_cin_vc    <= '0;
    if (!rst) begin
      int v;
      v = $urandom_range(0, V - 1);
      if (dso[v] > 0 && $urandom_range(0, 1) == 1) begin
        b_cin_valid[0] <= 1'b1; b_cin_vc[0] <= 2'(v); dso[v]--;
      end
      for (int o = 0; o < P; o++) if (b_out_valid[o]) begin
        int src, ivc, k;
        src = int'(b_out_flit[o][15:13]);
        ivc = int'(b_out_flit[o][12:11]);
        k   = key_of(src, ivc, int'(b_out_flit[o][10:5]));
        checks++;
        if (o != 0 || src >= P || !expq.exists(k) || expq[k].size() == 0) begin
          failures++; $display("FAIL unexpected flit %h on B output %0d", b_out_flit[o], o);
          continue;
        end
        if (expq[k].pop_front() !== {b_out_type[o], b_out_flit[o]}) begin
          failures++; $display("FAIL order: flit %h from %0d/%0d", b_out_flit[o], src, ivc);
        end
        checks++;
        if (is_head(b_out_type[o])) begin
          if (owner[b_out_vc[o]] != -1) begin failures++; $display("FAIL VC reused before tail"); end
          owner[b_out_vc[o]] = k;
        end else if (owner[b_out_vc[o]] != k) begin
          failures++; $display("FAIL VC carries another packet");
        end
        if (is_tail(b_out_type[o])) owner[b_out_vc[o]] = -1;
        dso[b_out_vc[o]]++;
        got++;
      end
    end
  end

  function automatic int key_of(input int src, input int ivc, input int p);
    return (src * V + ivc) * 64 + p;
  endfunction

  function automatic int pending();
    int s = 0;
    foreach (expq[k]) s += expq[k].size();
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) s += left[i][v];
    return s;
  endfunction

  initial begin
    rst = 1;
    a_in_valid = '0; a_in_vc = '0; a_in_type = '0; a_in_flit = '0;
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin upc[i][v] = D; left[i][v] = 0; seq[i][v] = 0; pkt[i][v] = 0; end
    for (int v = 0; v < V; v++) begin dso[v] = 0; owner[v] = -1; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    gen_on = 1;
    repeat (4000) @(negedge clk);
    gen_on = 0;
    for (int c = 0; c < 5000 && pending() != 0; c++) @(negedge clk);
    checks++;
    if (pending() != 0) begin failures++; $display("FAIL %0d flits stuck", pending()); end
    checks++;
    if (got != sent || got < 500) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    $display("chain: %0d flits sent through two routers", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
