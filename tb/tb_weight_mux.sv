// tb_weight_mux: self-checking test of weight_mux.
//
// A four-way instance (two select bits, as for four weight assignments) and a
// three-way instance (a select code left over) are driven with random data
// and every select value; the output is compared with the data bit the
// select names, or with data bit 0 for the unused code.
module tb_weight_mux;
  logic [3:0] a4;
  logic [1:0] s4;
  logic       y4;
  logic [2:0] a3;
  logic [1:0] s3;
  logic       y3;
  int checks = 0, failures = 0;

  weight_mux dut4 (.alpha(a4), .sel(s4), .y(y4));
  weight_mux #(.N(3)) dut3 (.alpha(a3), .sel(s3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp4, exp3;
    for (int n = 0; n < 400; n++) begin
      a4 = 4'($urandom);
      a3 = 3'($urandom);
      s4 = 2'(n % 4);
      s3 = 2'((n / 4) % 4);
      #1;
      case (s4)
        2'd0: exp4 = a4[0];
        2'd1: exp4 = a4[1];
        2'd2: exp4 = a4[2];
        default: exp4 = a4[3];
      endcase
      case (s3)
        2'd1: exp3 = a3[1];
        2'd2: exp3 = a3[2];
        default: exp3 = a3[0];
      endcase
      checks += 2;
      if (y4 !== exp4) begin failures++; $display("FAIL 4-way sel %0d data %b got %b", s4, a4, y4); end
      if (y3 !== exp3) begin failures++; $display("FAIL 3-way sel %0d data %b got %b", s3, a3, y3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
