// tb_switch_allocator: random requests and destinations for five inputs.
// A reference model keeps, per output, the highest-priority input that
// asked for it at the last clock edge; grant, match and in_match are
// compared with it every cycle, and every output must see contention
// (two or more inputs asking) at least once.
module tb_switch_allocator;
  localparam int P = 5;
  logic clk = 1'b0, rst;
  logic [P-1:0] req;
  logic [P-1:0][2:0] dest;
  logic [P-1:0][P-1:0] grant, match, exp_grant;
  logic [P-1:0] in_match;
  int checks = 0, failures = 0, contention = 0;

  switch_allocator #(.P(P)) dut (.clk(clk), .rst(rst), .req(req), .dest(dest),
    .grant(grant), .match(match), .in_match(in_match));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int o = 0; o < P; o++) begin
      exp_grant[o] <= '0;
      if (!rst)
        for (int i = P - 1; i >= 0; i--)
          if (req[i] && dest[i] == 3'(o)) exp_grant[o] <= P'(1) << i;
    end
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req = '0; dest = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int cnt [P];
      req = P'($urandom);
      for (int i = 0; i < P; i++) dest[i] = 3'($urandom_range(0, P - 1));
      for (int o = 0; o < P; o++) cnt[o] = 0;
      for (int i = 0; i < P; i++) if (req[i]) cnt[dest[i]]++;
      for (int o = 0; o < P; o++) if (cnt[o] > 1) contention++;
      #1;
      for (int o = 0; o < P; o++) begin
        logic [P-1:0] exp_match;
        exp_match = '0;
        for (int i = 0; i < P; i++) exp_match[i] = exp_grant[o][i] && req[i] && dest[i] == 3'(o);
        checks++;
        if (grant[o] !== exp_grant[o] || match[o] !== exp_match) begin
          failures++;
          $display("FAIL out %0d grant %b exp %b match %b exp %b", o, grant[o], exp_grant[o], match[o], exp_match);
        end
      end
      begin
        logic [P-1:0] m;
        m = '0;
        for (int o = 0; o < P; o++) m |= match[o];
        checks++;
        if (in_match !== m) begin failures++; $display("FAIL in_match"); end
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
