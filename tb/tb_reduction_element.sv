// tb_reduction_element: random windows and mask sizes through every
// reduction, compared with a bit-counting model.
module tb_reduction_element;
  import bip_pkg::*;
  localparam int N = 5;
  logic [N*N-1:0] x, active;
  red_op_e op;
  logic y;
  int checks = 0, failures = 0;

  reduction_element #(.N(N)) dut (.x(x), .active(active), .op(op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 7; o++) begin
      for (int t = 0; t < 300; t++) begin
        int m, ones, cnt;
        logic exp;
        m = 1 + 2 * ($urandom % 3);
        op = red_op_e'(o);
        // bias towards all-ones and all-zeros so AND and NOR also see 1
        case ($urandom % 4)
          0: x = '1;
          1: x = '0;
          default: x = (N*N)'($urandom);
        endcase
        if ($urandom % 3 == 0) x[$urandom % (N*N)] ^= 1'b1;
        active = '0;
        ones = 0; cnt = 0;
        for (int i = 0; i < N; i++)
          for (int k = 0; k < N; k++)
            if (i >= 2 - m/2 && i <= 2 + m/2 && k >= 2 - m/2 && k <= 2 + m/2) begin
              active[i*N+k] = 1'b1;
              cnt++;
              if (x[i*N+k]) ones++;
            end
        #1;
        case (o)
          0: exp = (ones == cnt);
          1: exp = (ones != 0);
          2: exp = (ones != cnt);
          3: exp = (ones == 0);
          4: exp = ones[0];
          5: exp = !ones[0];
          default: exp = x[12];
        endcase
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL op=%0d m=%0d x=%h y=%b exp=%b", o, m, x, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
