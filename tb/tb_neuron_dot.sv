// tb_neuron_dot: random Q9 input and weight vectors (44 wide, the hidden
// layer size) against a sum of products truncated to bits 24..9, with
// extreme values included.
module tb_neuron_dot;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  localparam int N = NN_IN;
  logic signed [15:0] x [N];
  logic signed [15:0] w [N];
  logic signed [21:0] sum;
  int checks = 0, failures = 0;

  neuron_dot #(.N(N)) dut (.x(x), .w(w), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int s;
      s = 0;
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0: begin x[i] = 16'($urandom); w[i] = 16'($urandom); end
          1: begin x[i] = 16'(int'($urandom % 1025) - 512); w[i] = 16'(int'($urandom % 801) - 400); end
          2: begin x[i] = 16'sh7fff; w[i] = (i % 2) ? 16'sh8000 : 16'sh7fff; end
          default: begin x[i] = -16'sd512; w[i] = 16'(int'($urandom % 65) - 32); end
        endcase
        s += qmul(int'(x[i]), int'(w[i]));
      end
      #1;
      checks++;
      if (int'(sum) != s) begin
        failures++;
        $display("case %0d: sum %0d expected %0d", t, sum, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
