// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// A reference pointer kept in the testbench predicts each grant for random
// request patterns: the first requester at or after the pointer wins and
// the pointer then moves past it. With all four requesting, grants must
// rotate 0,1,2,3; with none, no grant.
module tb_rr_arbiter;
  localparam int unsigned N = 4;
  logic         clk = 0, rst = 1;
  logic [N-1:0] req, grant;
  logic [1:0]   grant_idx;
  logic         grant_valid;
  int ref_ptr = 0;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    int exp_idx;
    exp_idx = -1;
    #1;
    for (int k = 0; k < N; k++) begin
      if (exp_idx < 0 && req[(ref_ptr + k) % N]) exp_idx = (ref_ptr + k) % N;
    end
    checks++;
    if (exp_idx < 0) begin
      if (grant_valid || grant != 0) begin failures++; $display("FAIL grant without request"); end
    end else begin
      if (!grant_valid || grant_idx != 2'(exp_idx) || grant != N'(1 << exp_idx)) begin
        failures++;
        $display("FAIL req=%b ptr=%0d grant=%b idx=%0d exp %0d", req, ref_ptr, grant, grant_idx, exp_idx);
      end
      ref_ptr = (exp_idx + 1) % N;
    end
    @(negedge clk);
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // all request: strict rotation
    req = '1;
    for (int n = 0; n < 8; n++) step_and_check();
    req = '0;
    step_and_check();
    for (int n = 0; n < 400; n++) begin
      req = N'($urandom);
      step_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
