// tb_mc_crossbar: random partial permutations of inputs to outputs; every
// output must deliver exactly the message of the input configured to it, and
// unaddressed outputs must be idle.
module tb_mc_crossbar;
  localparam int N = 8, W = 27;
  logic [N-1:0] in_valid, out_valid;
  logic [N-1:0][$clog2(N)-1:0] in_dest;
  logic [N-1:0][W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  mc_crossbar #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [N];
      int src [N];
      for (int j = 0; j < N; j++) begin perm[j] = j; src[j] = -1; end
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_valid[i] = $urandom_range(3, 0) != 0;
        in_dest[i]  = $clog2(N)'(perm[i]);
        in_data[i]  = W'($urandom);
        if (in_valid[i]) src[perm[i]] = i;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_valid[j] != (src[j] >= 0) || (src[j] >= 0 && out_data[j] != in_data[src[j]])) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
