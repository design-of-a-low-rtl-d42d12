// sync_io_tb -- self-checking testbench of the I/O interface: stall and
// in_ready for every combination of pinld request and in_valid, data
// pass-through, and the registered one-cycle out_valid pulse of pinst.
module sync_io_tb;
  import syncpro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pinld_req = 0, in_valid = 0, in_ready, stall, pinst_en = 0, out_valid;
  vec_t in_data = '0, vec;
  sword_t pinst_val = '0, out_data;
  int checks = 0, failures = 0, n_stall = 0;

  sync_io dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pend;
    sword_t pval, held;
    pend = 0; pval = 0; held = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pend || out_data !== held) begin
        failures++; $display("output: %b %0d exp %b %0d", out_valid, out_data, pend, held);
      end
      pinld_req = 1'($urandom); in_valid = 1'($urandom);
      in_data = {$urandom, $urandom, $urandom, $urandom};
      pinst_en = 1'($urandom); pinst_val = 16'($urandom);
      #1;
      checks++;
      if (stall !== (pinld_req && !in_valid) || in_ready !== (pinld_req && in_valid) ||
          vec !== in_data) begin
        failures++; $display("handshake wrong req %b valid %b", pinld_req, in_valid);
      end
      if (stall) n_stall++;
      pend = pinst_en;
      if (pinst_en) held = pinst_val;
    end
    checks++;
    if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
