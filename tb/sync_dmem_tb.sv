// sync_dmem_tb -- self-checking testbench of the vector scratchpad.
// Random mix of stores and loads against a reference array; a load's data
// is checked in the cycle after its address edge, and the output must hold
// across idle and store cycles.
module sync_dmem_tb;
  logic clk = 0, en = 0, we = 0;
  logic [7:0]   addr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] model [256];
  int checks = 0, failures = 0;

  sync_dmem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] last;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk); en = 1; we = 0; addr = 0;
    @(negedge clk); last = model[0];
    for (int n = 0; n < 3000; n++) begin
      int kind;
      logic [7:0] a;
      kind = $urandom % 3;
      a = 8'($urandom);
      en = kind != 0; we = kind == 2; addr = a;
      wdata = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      if (kind == 2) model[a] = wdata;
      if (kind == 1) last = model[a];
      checks++;
      if (rdata !== last) begin
        failures++;
        $display("cycle %0d kind %0d addr %0d: got %h exp %h", n, kind, a, rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
