// tb_crossbar: 5x5 crossbar with per-output fixed-priority arbiters.
//
// Random requests, destinations, allow bits and 16-bit payloads are driven
// every cycle. A reference model tracks the arbiter state of each output
// (highest-priority request at the last edge), works out which input moves
// (granted, still asking for that output, allowed) and the payload each
// output must show one clock later. in_gnt, in_spec_fail, out_valid and
// out_data are compared every cycle; moves, contention and lost
// (mis-speculated) grants must each happen.
module tb_crossbar;
  localparam int P = 5, W = 16;
  logic clk = 1'b0, rst;
  logic [P-1:0] in_req, in_allow, in_gnt, in_spec_fail, out_valid;
  logic [P-1:0][2:0] in_dest;
  logic [P-1:0][W-1:0] in_data, out_data;
  logic [P-1:0][P-1:0] st;          // model arbiter state [out][in]
  logic [P-1:0] exp_valid;
  logic [P-1:0][W-1:0] exp_data;
  int checks = 0, failures = 0, moves = 0, lost = 0;

  crossbar #(.P(P), .W(W)) dut (.clk(clk), .rst(rst), .in_req(in_req), .in_dest(in_dest),
    .in_allow(in_allow), .in_data(in_data), .in_gnt(in_gnt), .in_spec_fail(in_spec_fail),
    .out_valid(out_valid), .out_data(out_data));

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in_req = '0; in_dest = '0; in_allow = '0; in_data = '0;
    st = '0; exp_valid = '0; exp_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [P-1:0] g, sf, nv;
      logic [P-1:0][W-1:0] nd;
      if (n < 4) begin
        // every input to a distinct output, all allowed
        in_req = '1; in_allow = '1;
        for (int i = 0; i < P; i++) begin
          in_dest[i] = 3'((i + 2) % P);
          in_data[i] = 16'hA000 + 16'(i);
        end
      end else begin
        in_req   = P'($urandom);
        in_allow = P'($urandom) | P'($urandom);
        for (int i = 0; i < P; i++) begin
          in_dest[i] = 3'($urandom_range(0, P - 1));
          in_data[i] = 16'($urandom);
        end
      end
      #1;
      g = '0; sf = '0; nv = '0; nd = '0;
      for (int o = 0; o < P; o++)
        for (int i = 0; i < P; i++)
          if (st[o][i] && in_req[i] && in_dest[i] == 3'(o)) begin
            if (in_allow[i]) begin g[i] = 1; nv[o] = 1; nd[o] = in_data[i]; end
            else sf[i] = 1;
          end
      moves += $countones(g);
      lost  += $countones(sf);
      checks++;
      if (in_gnt !== g || in_spec_fail !== sf) begin
        failures++;
        $display("FAIL cycle %0d in_gnt %b exp %b spec_fail %b exp %b", n, in_gnt, g, in_spec_fail, sf);
      end
      checks++;
      if (out_valid !== exp_valid) begin
        failures++; $display("FAIL cycle %0d out_valid %b exp %b", n, out_valid, exp_valid);
      end
      for (int o = 0; o < P; o++) begin
        if (exp_valid[o]) begin
          checks++;
          if (out_data[o] !== exp_data[o]) begin
            failures++; $display("FAIL cycle %0d out %0d data %h exp %h", n, o, out_data[o], exp_data[o]);
          end
        end
      end
      @(posedge clk);
      // update model at the edge
      exp_valid = nv;
      exp_data  = nd;
      for (int o = 0; o < P; o++) begin
        st[o] = '0;
        for (int i = P - 1; i >= 0; i--)
          if (in_req[i] && in_dest[i] == 3'(o)) st[o] = P'(1) << i;
      end
      #1;
    end
    checks++;
    if (moves == 0 || lost == 0) begin failures++; $display("FAIL moves %0d lost %0d", moves, lost); end
    $display("crossbar: %0d moves, %0d lost grants", moves, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
