// tb_microprocessor: random RA, RB and opcodes; after a one-cycle start
// pulse the display register must hold RA op RB (reference model here). The
// display must change exactly 7 clock edges after the start pulse for the
// ordinary opcodes and 8 for the multiply opcodes, with done high in the
// cycle before. Also checks that the display reads 00 after reset.
module tb_microprocessor;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0;
  logic [7:0] ra = 8'h00, rb = 8'h00, disp;
  logic [3:0] ir = 4'h0;
  logic done;
  int checks = 0, failures = 0;

  microprocessor #(.W(8)) dut (.clk, .rst_n, .ra, .rb, .e, .ir, .disp, .done);

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
    logic [7:0] x, z, ex, prev;
    logic [3:0] o;
    int lat, want;
    logic done_before;
    repeat (2) @(posedge clk);
    #1;
    check(disp == 8'h00, "display not 00 after reset");
    rst_n = 1'b1;
    prev = 8'h00;
    for (int i = 0; i < 300; i++) begin
      o  = (i < 32) ? 4'(i) : 4'($urandom);
      x  = 8'($urandom);
      z  = 8'($urandom);
      ex = model(o, x, z);
      if (ex == prev) z = z + 8'd1;  // make the change visible
      ex = model(o, x, z);
      if (ex == prev) x = x + 8'd1;
      ex = model(o, x, z);
      ra = x;
      rb = z;
      ir = o;
      @(posedge clk);
      #1;
      e = 1'b1;
      @(posedge clk);
      #1;
      e = 1'b0;
      lat = 1;
      done_before = 1'b0;
      while (disp == prev && lat < 30) begin
        done_before = done;
        @(posedge clk);
        #1;
        lat++;
      end
      want = ((o == 4'h4) || (o == 4'h5)) ? 8 : 7;
      check(disp == ex, $sformatf("op=%h ra=%02h rb=%02h disp=%02h expected %02h", o, x, z, disp, ex));
      if (ex != prev) begin
        check(lat == want, $sformatf("op=%h latency %0d expected %0d", o, lat, want));
        check(done_before, "done not high in the cycle before the display change");
      end
      prev = disp;
      repeat (2) @(posedge clk);
    end
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
