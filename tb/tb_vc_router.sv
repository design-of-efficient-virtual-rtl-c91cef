// tb_vc_router: end-to-end test of the five-port speculative VC router at
// its default size (5 ports, 4 VCs of 4 flits, 16-bit flits).
//
// Phase 1 sends one single-flit message into each input in the same cycle,
// each naming a different output in its three low bits, and checks that
// every message leaves on its output exactly four cycles later.
//
// Phase 2 is random traffic: every input sends packets of 1 to 4 flits on
// all four VCs, interleaved, obeying the credits the router returns, to
// random outputs; a few packets carry a destination code that names no
// port and must be dropped. Downstream routers are modelled by credit
// returns after random delays. Each flit carries its source port, input VC
// and sequence number, so a scoreboard can check that it leaves on the
// right output, in order within its packet, that a downstream VC carries
// one packet from head to tail, and that no downstream buffer overflows.
// Finally the traffic is drained and every packet must have arrived.
//
// Mechanisms counted (each must occur): speculative wins (head crosses
// the cycle after it got its VC, without a separate switch round), lost
// speculation (switch granted, VC not won), VC allocation contention,
// switch contention, all VCs of an output busy, credit stalls, packet
// drops, and interleaving of two packets on one output link.
module tb_vc_router;
  import noc_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS, D = BUF_DEPTH;

  logic clk = 1'b0, rst;
  logic [P-1:0] in_valid, credit_out_valid, out_valid, credit_in_valid, drop;
  logic [P-1:0][1:0] in_vc, in_type, credit_out_vc, out_vc, out_type, credit_in_vc;
  logic [P-1:0][15:0] in_flit, out_flit;

  vc_router dut (.clk(clk), .rst(rst),
    .in_valid(in_valid), .in_vc(in_vc), .in_type(in_type), .in_flit(in_flit),
    .credit_out_valid(credit_out_valid), .credit_out_vc(credit_out_vc),
    .out_valid(out_valid), .out_vc(out_vc), .out_type(out_type), .out_flit(out_flit),
    .credit_in_valid(credit_in_valid), .credit_in_vc(credit_in_vc), .drop(drop));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ state
  typedef struct packed { logic [1:0] t; logic [15:0] d; int unsigned port; } exp_t;
  exp_t         expq [P][V][$];     // flits expected from (input, in-VC)
  int           upc  [P][V];        // upstream credits held by the sender
  int           dso  [P][V];        // downstream occupancy (output, out-VC)
  int           owner[P][V];        // (input*V+invc) owning (output,out-VC), -1 none
  int           drops_expected = 0, drops_seen = 0;
  bit           gen_on = 0, drain = 0, phase1 = 1, fast = 0;
  int           out3_count = 0;

  // packet generator state per (input, VC)
  int           left [P][V];        // flits left in current packet
  int           pdest[P][V];        // destination code of current packet
  int           seq  [P][V];
  bit           pdrop[P][V];

  // mechanism counters
  int n_spec_win = 0, n_spec_lost = 0, n_va_cont = 0, n_sa_cont = 0;
  int n_same_cycle = 0, n_exhaust = 0, n_credit_stall = 0, n_interleave = 0, n_delivered = 0;
  logic [P-1:0] va_gnt_d;
  logic [P-1:0][1:0] last_ovc;
  logic [P-1:0] last_ovc_valid;

  // ------------------------------------------- mechanism observation
  always @(negedge clk) if (!rst) begin
    int cnt_va [P], cnt_sa [P];
    for (int o = 0; o < P; o++) begin cnt_va[o] = 0; cnt_sa[o] = 0; end
    for (int i = 0; i < P; i++) begin
      if (dut.va_req[i]) cnt_va[dut.va_port[i]]++;
      if (dut.sa_req[i]) cnt_sa[dut.f_dest[i]]++;
      if (dut.xbar_gnt[i] && dut.f_head[i] && (va_gnt_d[i] || dut.va_gnt[i])) n_spec_win++;
      if (dut.xbar_gnt[i] && dut.f_head[i] && dut.va_gnt[i]) n_same_cycle++;
      if (dut.spec_fail[i] && dut.f_head[i] && !dut.has_vc[i][dut.sel[i]]) n_spec_lost++;
      for (int v = 0; v < V; v++)
        if (dut.head_valid[i][v] && dut.has_vc[i][v] && !dut.credit_ok[dut.route[i][v]][dut.ovc[i][v]])
          n_credit_stall++;
    end
    for (int o = 0; o < P; o++) begin
      if (cnt_va[o] > 1) n_va_cont++;
      if (cnt_sa[o] > 1) n_sa_cont++;
      if (!dut.free_any[o]) n_exhaust++;
    end
    va_gnt_d <= dut.va_gnt;
  end

  // --------------------------------------------------- output scoreboard
  always @(negedge clk) if (!rst && !phase1) begin
    drops_seen += $countones(drop);
    for (int o = 0; o < P; o++) if (out_valid[o]) begin
      int src, ivc, key;
      exp_t e;
      src = int'(out_flit[o][15:13]);
      ivc = int'(out_flit[o][12:11]);
      key = src * V + ivc;
      checks++;
      if (src >= P || expq[src][ivc].size() == 0) begin
        fail($sformatf("unexpected flit %h on output %0d", out_flit[o], o));
        continue;
      end
      e = expq[src][ivc].pop_front();
      if (e.d !== out_flit[o] || e.t !== out_type[o] || e.port != o)
        fail($sformatf("out %0d got %h/%b exp %h/%b port %0d", o, out_flit[o], out_type[o], e.d, e.t, e.port));
      // downstream VC ownership: one packet from head to tail
      checks++;
      if (is_head(out_type[o])) begin
        if (owner[o][out_vc[o]] != -1) fail($sformatf("out %0d vc %0d reused before tail", o, out_vc[o]));
        owner[o][out_vc[o]] = key;
      end else if (owner[o][out_vc[o]] != key) begin
        fail($sformatf("out %0d vc %0d carries flit of another packet", o, out_vc[o]));
      end
      if (is_tail(out_type[o])) owner[o][out_vc[o]] = -1;
      // downstream buffer must not overflow
      dso[o][out_vc[o]]++;
      checks++;
      if (dso[o][out_vc[o]] > D) fail($sformatf("out %0d vc %0d overflow", o, out_vc[o]));
      if (last_ovc_valid[o] && last_ovc[o] != out_vc[o] && owner[o][last_ovc[o]] != -1) n_interleave++;
      last_ovc[o] = out_vc[o];
      last_ovc_valid[o] = 1;
      n_delivered++;
      if (o == 3) out3_count++;
    end
  end

  // upstream credits returned by the router
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < P; i++) if (credit_out_valid[i]) upc[i][credit_out_vc[i]]++;
  end

  // downstream routers: return a credit after a random delay
  always @(negedge clk) begin
    credit_in_valid <= '0;
    credit_in_vc    <= '0;
    if (!rst) for (int o = 0; o < P; o++) begin
      int v;
      v = $urandom_range(0, V - 1);
      if (fast) for (int k = V - 1; k >= 0; k--) if (dso[o][k] > 0) v = k;
      if (dso[o][v] > 0 && (fast || $urandom_range(0, 3) == 0)) begin
        credit_in_valid[o] <= 1'b1;
        credit_in_vc[o]    <= 2'(v);
        dso[o][v]--;
      end
    end
  end

  // ------------------------------------------------ random generator
  // gen_on: start new packets; drain: only finish the open ones
  always @(negedge clk) if (!phase1) begin
    in_valid <= '0;
    if (!rst && (gen_on || drain)) for (int i = 0; i < P; i++) begin
      int v;
      logic [1:0] t;
      logic [15:0] d;
      if (fast ? (i == 0) : ($urandom_range(0, 9) < 7)) begin
        v = $urandom_range(0, V - 1);
        if (fast) for (int k = V - 1; k >= 0; k--) if (upc[i][k] > 0) v = k;
        if (upc[i][v] > 0 && (gen_on || left[i][v] != 0)) begin
          if (left[i][v] == 0) begin
            left[i][v]  = fast ? 1 : $urandom_range(1, 4);
            pdrop[i][v] = !fast && ($urandom_range(0, 39) == 0);
            // skewed destinations create hot spots
            pdest[i][v] = fast ? 4 : ($urandom_range(0, 1) == 0) ? 2 : $urandom_range(1, P);
            t = (left[i][v] == 1) ? FT_SINGLE : FT_HEAD;
          end else begin
            t = (left[i][v] == 1) ? FT_TAIL : FT_BODY;
          end
          d = {3'(i), 2'(v), 8'(seq[i][v]), pdrop[i][v] ? 3'b110 : 3'(pdest[i][v])};
          seq[i][v]++;
          left[i][v]--;
          upc[i][v]--;
          in_valid[i] <= 1'b1;
          in_vc[i]    <= 2'(v);
          in_type[i]  <= t;
          in_flit[i]  <= d;
          if (pdrop[i][v]) drops_expected++;
          else expq[i][v].push_back('{t: t, d: d, port: pdest[i][v] - 1});
        end
      end
    end
  end

  function automatic int open_packets();
    int s = 0;
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) s += (left[i][v] != 0);
    return s;
  endfunction

  function automatic int pending();
    int s = 0;
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) s += expq[i][v].size();
    return s;
  endfunction

  // ------------------------------------------------------- main
  // the five messages of the single-cycle test: one per input, each names
  // a different output in bits [2:0]
  localparam logic [15:0] MSG [P] = '{16'b0011001101110101, 16'b1111001000111100,
                                      16'b1110000111010001, 16'b0001111010001010,
                                      16'b1100110000110011};
  initial begin
    int t0;
    logic [P-1:0] seen;
    rst = 1;
    in_valid = '0; in_vc = '0; in_type = '0; in_flit = '0;
    va_gnt_d = '0; last_ovc = '0; last_ovc_valid = '0;
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin
      upc[i][v] = D; dso[i][v] = 0; owner[i][v] = -1; left[i][v] = 0; seq[i][v] = 0; pdrop[i][v] = 0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---------------- phase 1: one message per input, all at once
    // (the scoreboard is bypassed: these flits carry no source tag)
    @(negedge clk);
    for (int i = 0; i < P; i++) begin
      in_valid[i] = 1; in_vc[i] = 0; in_type[i] = FT_SINGLE; in_flit[i] = MSG[i];
      upc[i][0]--;
    end
    t0 = cycle;
    @(negedge clk);
    in_valid = '0;
    seen = '0;
    for (int c = 0; c < 10; c++) begin
      for (int o = 0; o < P; o++) if (dut.out_valid[o]) begin
        checks++;
        seen[o] = 1;
        begin
          int src;
          src = -1;
          for (int i = 0; i < P; i++) if (MSG[i][2:0] == 3'(o + 1)) src = i;
          if (out_flit[o] !== MSG[src] || cycle - t0 != 4)
            fail($sformatf("phase1 out %0d flit %b latency %0d", o, out_flit[o], cycle - t0));
          dso[o][out_vc[o]]++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (seen != '1) fail($sformatf("phase1 outputs seen %b", seen));
    phase1 = 0;

    // ---------------- phase 2: random traffic, then drain
    gen_on = 1;
    repeat (6000) @(negedge clk);
    gen_on = 0;
    drain = 1;
    for (int c = 0; c < 2000 && open_packets() != 0; c++) @(negedge clk);
    drain = 0;
    for (int c = 0; c < 2000 && pending() != 0; c++) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (pending() != 0) fail($sformatf("%0d flits never delivered", pending()));
    checks++;
    if (drops_seen != drops_expected) fail($sformatf("drops %0d expected %0d", drops_seen, drops_expected));


    // ---------------- phase 3: one input streams single-flit packets to
    // output 4 with immediate credit return: one flit per cycle expected
    fast = 1;
    gen_on = 1;
    repeat (50) @(negedge clk);
    begin
      int c0;
      c0 = out3_count;
      repeat (200) @(negedge clk);
      $display("streaming: %0d flits in 200 cycles", out3_count - c0);
      checks++;
      if (out3_count - c0 < 196) fail($sformatf("streaming rate %0d/200", out3_count - c0));
    end
    gen_on = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (pending() != 0) fail($sformatf("%0d streamed flits not delivered", pending()));

    $display("delivered %0d flits; spec wins %0d, lost speculations %0d, VA contention %0d, SA contention %0d",
             n_delivered, n_spec_win, n_spec_lost, n_va_cont, n_sa_cont);
    $display("heads leaving in the cycle of their VC allocation %0d", n_same_cycle);
    $display("all-VCs-busy %0d, credit stalls %0d, drops %0d, link interleavings %0d",
             n_exhaust, n_credit_stall, drops_seen, n_interleave);
    checks++; if (n_spec_win == 0)     fail("no speculative win");
    checks++; if (n_same_cycle == 0)   fail("no head left in the cycle of its VC allocation");
    checks++; if (n_spec_lost == 0)    fail("no lost speculation");
    checks++; if (n_va_cont == 0)      fail("no VC allocation contention");
    checks++; if (n_sa_cont == 0)      fail("no switch contention");
    checks++; if (n_exhaust == 0)      fail("no output with all VCs busy");
    checks++; if (n_credit_stall == 0) fail("no credit stall");
    checks++; if (drops_seen == 0)     fail("no drop");
    checks++; if (n_interleave == 0)   fail("no interleaving on a link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
