// tb_regfile: random reads and writes on a 4-read, 2-write register file,
// compared with a testbench array; checks reset clearing, next-cycle
// visibility of writes and that write port 1 wins over port 0 on the same
// register.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n;
  logic [3:0][4:0]   raddr;
  logic [3:0][31:0]  rdata;
  logic [1:0]        we;
  logic [1:0][4:0]   waddr;
  logic [1:0][31:0]  wdata;
  regfile #(.W(32), .NREGS(32), .NR(4), .NW(2)) dut (.clk, .rst_n, .raddr, .rdata,
                                                      .we, .waddr, .wdata);
  logic [31:0] model [32];
  int same_addr = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = '0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      model[r] = '0;
      raddr[0] = 5'(r);
      #1 checks++;
      if (rdata[0] !== 32'd0) begin failures++; $display("FAIL reset r%0d", r); end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL read p%0d r%0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      we = 2'($urandom);
      waddr[0] = 5'($urandom);
      waddr[1] = (n % 5 == 0) ? waddr[0] : 5'($urandom);
      wdata[0] = $urandom; wdata[1] = $urandom;
      if (we == 2'b11 && waddr[0] == waddr[1]) same_addr++;
      @(posedge clk);
      if (we[0]) model[waddr[0]] = wdata[0];
      if (we[1]) model[waddr[1]] = wdata[1];
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL same-address write never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
