// tb_vc_allocator: VC allocation and credit counting.
//
// Random VC requests from five inputs, random credit spending (only on VCs
// that still have a credit), random VC release (only of busy VCs) and
// random credit returns (only of credits that were spent), and now and
// then the release of a VC in the very cycle it is allocated (the release
// must win). A reference
// model keeps busy bits and credit counts; every cycle va_gnt/va_vc,
// credit_ok and free_any are compared with it. Contention (two inputs for
// one output), exhaustion (all VCs of an output busy) and running out of
// credits must each occur.
module tb_vc_allocator;
  localparam int P = 5, V = 4, D = 4;
  logic clk = 1'b0, rst;
  logic [P-1:0] va_req, va_gnt, use_valid, rel_valid, credit_in_valid, free_any;
  logic [P-1:0][2:0] va_port;
  logic [P-1:0][1:0] va_vc, use_vc, rel_vc, credit_in_vc;
  logic [P-1:0][V-1:0] credit_ok;
  int checks = 0, failures = 0, same_cycle = 0, contention = 0, exhausted = 0, no_credit = 0;
  bit busy [P][V];
  int cred [P][V];

  vc_allocator #(.P(P), .V(V), .DEPTH(D)) dut (.clk(clk), .rst(rst),
    .va_req(va_req), .va_port(va_port), .va_gnt(va_gnt), .va_vc(va_vc),
    .use_valid(use_valid), .use_vc(use_vc), .rel_valid(rel_valid), .rel_vc(rel_vc),
    .credit_in_valid(credit_in_valid), .credit_in_vc(credit_in_vc),
    .credit_ok(credit_ok), .free_any(free_any));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; va_req = '0; va_port = '0; use_valid = '0; use_vc = '0;
    rel_valid = '0; rel_vc = '0; credit_in_valid = '0; credit_in_vc = '0;
    for (int o = 0; o < P; o++) for (int v = 0; v < V; v++) begin busy[o][v] = 0; cred[o][v] = D; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [P-1:0] eg;
      logic [P-1:0][1:0] evc;
      int cnt [P];
      // stimulus
      for (int i = 0; i < P; i++) begin
        va_req[i]  = ($urandom_range(0, 3) == 0);
        va_port[i] = 3'($urandom_range(0, P - 1));
      end
      for (int o = 0; o < P; o++) begin
        int v;
        v = $urandom_range(0, V - 1);
        use_valid[o] = (cred[o][v] > 0) && ($urandom_range(0, 1) == 1);
        use_vc[o] = 2'(v);
        v = $urandom_range(0, V - 1);
        rel_valid[o] = busy[o][v] && ($urandom_range(0, 5) == 0);
        rel_vc[o] = 2'(v);
        v = $urandom_range(0, V - 1);
        credit_in_valid[o] = (cred[o][v] < D) && ($urandom_range(0, 2) == 0);
        credit_in_vc[o] = 2'(v);
      end
      // model
      eg = '0; evc = '0;
      for (int o = 0; o < P; o++) begin
        int win, fv;
        win = -1; fv = -1; cnt[o] = 0;
        for (int i = 0; i < P; i++) if (va_req[i] && va_port[i] == 3'(o)) begin
          cnt[o]++;
          if (win < 0) win = i;
        end
        for (int v = 0; v < V; v++) if (!busy[o][v] && fv < 0) fv = v;
        if (cnt[o] > 1) contention++;
        if (fv < 0) exhausted++;
        if (win >= 0 && fv >= 0) begin
          eg[win] = 1; evc[win] = 2'(fv);
          // sometimes the packet leaves in the cycle it gets its VC
          if ($urandom_range(0, 3) == 0) begin
            rel_valid[o] = 1'b1; rel_vc[o] = 2'(fv); same_cycle++;
          end
        end
      end
      #1;
      checks++;
      if (va_gnt !== eg) begin failures++; $display("FAIL n=%0d va_gnt %b exp %b", n, va_gnt, eg); end
      for (int i = 0; i < P; i++) if (eg[i]) begin
        checks++;
        if (va_vc[i] !== evc[i]) begin failures++; $display("FAIL n=%0d va_vc[%0d]", n, i); end
      end
      for (int o = 0; o < P; o++) begin
        bit fa;
        fa = 0;
        for (int v = 0; v < V; v++) begin
          if (!busy[o][v]) fa = 1;
          if (cred[o][v] == 0) no_credit++;
          checks++;
          if (credit_ok[o][v] !== (cred[o][v] > 0)) begin
            failures++; $display("FAIL n=%0d credit_ok[%0d][%0d]", n, o, v);
          end
        end
        checks++;
        if (free_any[o] !== fa) begin failures++; $display("FAIL n=%0d free_any[%0d]", n, o); end
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < P; o++) begin
        if (use_valid[o]) cred[o][use_vc[o]]--;
        if (credit_in_valid[o]) cred[o][credit_in_vc[o]]++;
      end
      for (int i = 0; i < P; i++) if (eg[i]) busy[va_port[i]][evc[i]] = 1;
      for (int o = 0; o < P; o++) if (rel_valid[o]) busy[o][rel_vc[o]] = 0;
    end
    checks++;
    if (contention == 0 || exhausted == 0 || no_credit == 0 || same_cycle == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", contention, exhausted, no_credit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
