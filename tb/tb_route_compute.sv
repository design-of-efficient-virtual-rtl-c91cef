// tb_route_compute: exhaustive check of the routing computation on the
// destination field: every 3-bit code with random upper flit bits. Codes
// 1..5 must give that port (one-hot and index), other codes must be
// flagged invalid with no port selected.
module tb_route_compute;
  localparam int P = 5;
  logic [15:0] flit;
  logic        valid;
  logic [P-1:0] port_oh;
  logic [2:0]  port_idx;
  int checks = 0, failures = 0;

  route_compute #(.P(P), .FLIT_W(16), .DEST_W(3)) dut (
    .flit(flit), .valid(valid), .port_oh(port_oh), .port_idx(port_idx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [2:0] code;
      logic exp_valid;
      code = 3'(n % 8);
      flit = {13'($urandom), code};
      #1;
      exp_valid = (code >= 1 && code <= 5);
      checks++;
      if (valid !== exp_valid) begin
        failures++; $display("FAIL code %0d valid %b", code, valid);
      end
      checks++;
      if (exp_valid && (port_idx !== 3'(code - 1) || port_oh !== (5'b1 << (code - 1)))) begin
        failures++; $display("FAIL code %0d idx %0d oh %b", code, port_idx, port_oh);
      end else if (!exp_valid && port_oh !== '0) begin
        failures++; $display("FAIL code %0d oh %b", code, port_oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
