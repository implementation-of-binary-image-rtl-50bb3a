// tb_binary_median_filter: random windows of 1x1, 3x3 and 5x5 masks, and
// windows with exactly half-plus-one or half ones, against a sorting model;
// then rank-order thresholds around the number of set bits.
module tb_binary_median_filter;
  localparam int N = 5;
  logic [N*N-1:0] x, active;
  logic y;
  logic [4:0] rank;
  int checks = 0, failures = 0;

  binary_median_filter #(.N(N)) dut (.x(x), .active(active), .rank(rank), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int m, cnt, ones, idx [$];
      logic exp;
      m = 1 + 2 * ($urandom % 3);
      active = '0;
      idx.delete();
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++)
          if (i >= 2 - m/2 && i <= 2 + m/2 && k >= 2 - m/2 && k <= 2 + m/2) begin
            active[i*N+k] = 1'b1;
            idx.push_back(i*N+k);
          end
      cnt = idx.size();
      // choose how many active bits are set, near the threshold half the time
      ones = (t % 2) ? (cnt / 2 + ($urandom % 2)) : int'($urandom % (cnt + 1));
      x = (N*N)'($urandom) & ~active;   // garbage outside the mask
      idx.shuffle();
      for (int j = 0; j < ones; j++) x[idx[j]] = 1'b1;
      // median of the sorted active values: the middle element
      exp = (ones > cnt - 1 - cnt / 2);
      rank = '0;
      if (t >= 1000) begin
        // rank-order: 1 when at least rank active bits are set
        rank = 5'(1 + $urandom % cnt);
        if (t % 3 == 0) rank = 5'(ones + ($urandom % 2));
        if (rank == 0) rank = 5'd1;
        exp = (ones >= int'(rank));
      end
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL m=%0d ones=%0d y=%b exp=%b", m, ones, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
