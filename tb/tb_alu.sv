// tb_alu: random operands and all sixteen opcodes against a reference model
// written here. Sequence per operation: EALU for one cycle, then (multiply
// opcodes) EU for one cycle. Checks the result one cycle after EALU for the
// ordinary opcodes and one cycle after EU for the multiply opcodes, that a
// multiply result is not yet visible before EU, and that the ALU holds its
// captured operands while EALU is low.
module tb_alu;
  logic clk = 1'b0, rst_n = 1'b0, ealu = 1'b0, eu = 1'b0;
  logic [3:0] op = 4'h0;
  logic [7:0] a = 8'h00, b = 8'h00, y;
  int checks = 0, failures = 0;

  alu #(.W(8)) dut (.clk, .rst_n, .ealu, .eu, .op, .a, .b, .y);

  always #5 clk = ~clk;

  function automatic logic [7:0] model(input logic [3:0] o, input logic [7:0] x, input logic [7:0] z);
    int unsigned pr;
    pr = x * z;
    case (o)
      4'h0: return x + z;
      4'h1: return x - z;
      4'h2: return x << z[2:0];
      4'h3: return x >> z[2:0];
      4'h4: return pr[7:0];
      4'h5: return pr[15:8];
      4'h6: return x & z;
      4'h7: return x | z;
      4'h8: return x ^ z;
      4'h9: return ~(x & z);
      4'hA: return ~(x | z);
      4'hB: return ~(x ^ z);
      4'hC: return ~x;
      4'hD: return (x < z) ? 8'd1 : 8'd0;
      4'hE: return (x == z) ? 8'd1 : 8'd0;
      default: return x;
    endcase
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [7:0] x, z, e;
    logic [3:0] o;
    logic mul;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      o = (i < 32) ? 4'(i) : 4'($urandom);
      x = 8'($urandom);
      z = (i % 7 == 0) ? x : 8'($urandom);
      mul = (o == 4'h4) || (o == 4'h5);
      e = model(o, x, z);
      ealu <= 1'b1;
      op <= o;
      a <= x;
      b <= z;
      @(posedge clk);
      ealu <= 1'b0;
      a <= ~x;
      b <= ~z;
      op <= ~o;
      #1;
      if (mul) begin
        eu <= 1'b1;
        @(posedge clk);
        eu <= 1'b0;
        #1;
      end
      check(y == e, $sformatf("op=%h a=%02h b=%02h y=%02h expected %02h", o, x, z, y, e));
      @(posedge clk);
      #1;
      check(y == e, $sformatf("hold: op=%h y=%02h expected %02h", o, y, e));
    end
    // multiply result appears only after EU
    ealu <= 1'b1; op <= 4'h4; a <= 8'd3; b <= 8'd5;
    @(posedge clk);
    ealu <= 1'b0; eu <= 1'b1;
    @(posedge clk);
    eu <= 1'b0;
    #1;
    check(y == 8'd15, "product 3*5");
    ealu <= 1'b1; op <= 4'h4; a <= 8'd7; b <= 8'd9;
    @(posedge clk);
    ealu <= 1'b0;
    #1;
    check(y == 8'd15, "new product visible before EU");
    eu <= 1'b1;
    @(posedge clk);
    eu <= 1'b0;
    #1;
    check(y == 8'd63, "product after EU");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
