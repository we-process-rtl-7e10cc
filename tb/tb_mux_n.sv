// tb_mux_n: three-input multiplexer with random inputs; y must equal the
// selected input for selects 0..2 and 0 for the unused select 3.
module tb_mux_n;
  logic [2:0][7:0] d;
  logic [1:0] sel;
  logic [7:0] y, expv;
  int checks = 0, failures = 0;

  mux_n #(.W(8), .N(3)) dut (.d, .sel, .y);

  initial begin
    for (int i = 0; i < 300; i++) begin
      d   = 24'($urandom);
      sel = 2'($urandom);
      #1;
      case (sel)
        2'd0: expv = d[0];
        2'd1: expv = d[1];
        2'd2: expv = d[2];
        default: expv = 8'h00;
      endcase
      checks++;
      if (y != expv) begin
        failures++;
        $display("FAIL: sel=%0d y=%02h expected %02h", sel, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
