// tb_fixed_priority_arbiter: self-checking test of the fixed-priority
// arbiter FSM.
//
// First replays the classic staircase: all five requests rise together and
// then drop one by one from req1 to req4, so the grant must walk from
// grant1 to grant5. Then 2000 cycles of random requests. A reference model
// computes, for every clock, the one-hot grant of the highest-priority
// request seen at the previous clock edge (req1 highest), and the grant is
// compared with it every cycle, including the one-clock grant latency.
module tb_fixed_priority_arbiter;
  localparam int N = 5;

  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] req;
  logic [N-1:0] grant;
  logic [N-1:0] expected;
  int checks = 0, failures = 0;

  fixed_priority_arbiter #(.N(N)) dut (.clk(clk), .rst(rst), .req(req), .grant(grant));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model(input logic [N-1:0] r);
    for (int k = 0; k < N; k++) if (r[k]) return N'(1) << k;
    return '0;
  endfunction

  // reference: grant is the priority encode of the request at the last edge
  always_ff @(posedge clk) expected <= rst ? '0 : model(req);

  task automatic step_check(input logic [N-1:0] r);
    req = r;
    @(posedge clk);
    #1;
    checks++;
    if (grant !== expected) begin
      failures++;
      $display("FAIL t=%0t req=%b grant=%b expected=%b", $time, r, grant, expected);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    req = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // staircase: all requests, then drop req1, req2, req3, req4 in turn
    step_check(5'b11111);
    step_check(5'b11111);
    if (grant !== 5'b00001) begin failures++; $display("FAIL grant1 not first"); end
    checks++;
    step_check(5'b11110);
    step_check(5'b11110);
    if (grant !== 5'b00010) begin failures++; $display("FAIL grant2"); end
    checks++;
    step_check(5'b11100);
    step_check(5'b11000);
    step_check(5'b10000);
    step_check(5'b10000);
    if (grant !== 5'b10000) begin failures++; $display("FAIL grant5 last"); end
    checks++;
    step_check(5'b00000);
    step_check(5'b00000);
    if (grant !== 5'b00000) begin failures++; $display("FAIL idle"); end
    checks++;
    // random requests
    for (int n = 0; n < 2000; n++) step_check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
