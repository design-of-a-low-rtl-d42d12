// sync_vrf_tb -- self-checking testbench of one vector register file.
// Random writes and random addresses on the three read ports (two local, one
// broadcast), compared against a reference array; reads before an edge must
// still show the old contents.
module sync_vrf_tb;
  logic clk = 0, rst_n = 0;
  logic [1:0]   ra_a, ra_b, ra_c, wa;
  logic [127:0] rd_a, rd_b, rd_c, wd;
  logic         we;
  logic [127:0] model [4];
  int checks = 0, failures = 0;

  sync_vrf dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [127:0] got, input logic [1:0] a);
    checks++;
    if (got !== model[a]) begin
      failures++;
      $display("reg %0d: got %h exp %h", a, got, model[a]);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra_a = 0; ra_b = 0; ra_c = 0;
    for (int i = 0; i < 4; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra_a = 2'($urandom); ra_b = 2'($urandom); ra_c = 2'($urandom);
      we = 1'($urandom); wa = 2'($urandom);
      wd = {$urandom, $urandom, $urandom, $urandom};
      #1 chk(rd_a, ra_a); chk(rd_b, ra_b); chk(rd_c, ra_c);
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
