// tb_cmat_decoder: exhaustive test of the row/column decoder (B = 4):
// with en low no output is on; with en high exactly output addr is on.
module tb_cmat_decoder;
  localparam int unsigned B = 4;
  localparam int unsigned N = 1 << B;
  logic en;
  logic [B-1:0] addr;
  logic [N-1:0] sel;
  int checks = 0, failures = 0;

  cmat_decoder #(.B(B)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < N; a++) begin
        en = 1'(e); addr = B'(a);
        #1;
        checks++;
        for (int k = 0; k < N; k++) begin
          if (sel[k] != ((e == 1) && (k == a))) begin
            failures++;
            $display("FAIL en=%0d addr=%0d line %0d = %0d", e, a, k, sel[k]);
            break;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
