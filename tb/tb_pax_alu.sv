// tb_pax_alu: checks every ALU operation at 64 bits on random and corner
// operands against expressions written independently in the testbench.
module tb_pax_alu;
  import pax_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  alu_op_e     op;
  logic [63:0] a, b, y, e;
  pax_alu #(.W(64)) dut (.op, .a, .b, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a  = (n % 50 == 0) ? '1 : {$urandom, $urandom};
      b  = (n % 70 == 0) ? 64'd1 : {$urandom, $urandom};
      op = alu_op_e'(n % 7);
      #1;
      case (n % 7)
        0: e = 64'(a + b);
        1: e = 64'(a + ~b + 64'd1);
        2: e = a & b;
        3: e = a | b;
        4: e = a ^ b;
        5: e = a & ~b;
        default: e = b;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h got %h exp %h", n % 7, a, b, y, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
