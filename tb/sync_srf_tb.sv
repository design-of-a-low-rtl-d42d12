// sync_srf_tb -- self-checking testbench of the scalar register file.
// Random writes on both write ports (distinct registers) and random reads on
// all four read ports, compared against a reference array. Also checks the
// reset value and that a write becomes visible only after the clock edge.
module sync_srf_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0][3:0]  raddr;
  logic [3:0][15:0] rdata;
  logic [1:0]       we;
  logic [1:0][3:0]  waddr;
  logic [1:0][15:0] wdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  sync_srf dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (rdata[p] !== model[raddr[p]]) begin
        failures++;
        $display("port %0d reg %0d: got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
      end
    end
  endtask

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) raddr[p] = 4'($urandom);
      we       = 2'($urandom);
      waddr[0] = 4'($urandom);
      waddr[1] = waddr[0] + 4'(1 + $urandom % 15);
      wdata    = {16'($urandom), 16'($urandom)};
      #1 check_reads();   // old contents before the edge
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
