// sync_pmem_tb -- self-checking testbench of the program memory.
// Fills a set of addresses with random 96-bit words, reads them back with
// the one-cycle read latency (address on one edge, word in the next cycle)
// and checks that the output holds while en = 0.
module sync_pmem_tb;
  logic clk = 0, en = 0, we = 0;
  logic [7:0]  addr = '0;
  logic [95:0] wdata = '0, rdata;
  logic [95:0] model [256];
  int checks = 0, failures = 0;

  sync_pmem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [95:0] rnd96();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); wdata = rnd96(); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      logic [7:0] a;
      a = 8'($urandom);
      @(negedge clk); en = 1; addr = a;
      @(negedge clk); en = ($urandom % 2) == 1; addr = 8'($urandom);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("read %0d: got %h exp %h", a, rdata, model[a]);
      end
      if (!en) begin
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("hold %0d failed", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
