// tb_priority_arbiter: exhaustive check of the fixed priority arbiter.
//
// For every request pattern of a 5-input arbiter, the expected grant (the
// lowest-numbered active request, one-hot, or zero) is computed by a loop in
// the testbench and compared with the block's output.
module tb_priority_arbiter;
  localparam int unsigned N = 5;
  logic [N-1:0] req, grant, expect_g;
  int checks = 0, failures = 0;

  priority_arbiter #(.N(N)) dut (.req(req), .grant(grant));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < (1 << N); r++) begin
      req = N'(r);
      expect_g = '0;
      for (int i = N-1; i >= 0; i--) if (req[i]) expect_g = N'(1) << i;
      #1;
      checks++;
      if (grant !== expect_g) begin
        failures++;
        $display("FAIL req=%b grant=%b expected=%b", req, grant, expect_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
