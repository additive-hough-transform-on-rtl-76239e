// tb_aht_angle_luts: reads every LHT and GHT entry of three angle tables
// (0, 67.5 and 135 degrees of 8 angles) and compares each with the value
// computed here from cos/sin: LHT bin = round(i*cos + j*sin) - min over the
// block, GHT base = round(m*(bx*cos + by*sin)) + min + n.  It also checks
// that ght_all agrees with the read port.
module tb_aht_angle_luts;
  localparam int N = 256, K = 32, A = 8, M = N / K;
  localparam int LB_W = $clog2(((M - 1) * 1415 + 999) / 1000 + 2);
  localparam int RHO_W = $clog2(N + ((N - 1) * 1415 + 999) / 1000 + 2);
  localparam int NT = 3;
  localparam int ANGLES [NT] = '{0, 3, 6};

  logic [$clog2(M*M)-1:0] lht_addr;
  logic [$clog2(K*K)-1:0] ght_addr;
  logic [LB_W-1:0]  lht_data [NT];
  logic [RHO_W-1:0] ght_data [NT];
  logic [RHO_W-1:0] ght_all  [NT][K*K];
  int checks = 0, failures = 0;

  for (genvar t = 0; t < NT; t++) begin : g_dut
    aht_angle_luts #(.N(N), .K(K), .A(A), .ANGLE(ANGLES[t])) dut (
      .lht_addr (lht_addr), .lht_data (lht_data[t]),
      .ght_addr (ght_addr), .ght_data (ght_data[t]), .ght_all (ght_all[t]));
  end

  function automatic int round_half_up(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      real th, c, s;
      int mn;
      th = ANGLES[t] * 3.14159265358979323846 / A;
      c = $cos(th); s = $sin(th);
      mn = 0;
      for (int j = 0; j < M; j++)
        for (int i = 0; i < M; i++)
          if (round_half_up(i * c + j * s) < mn) mn = round_half_up(i * c + j * s);
      for (int p = 0; p < M * M; p++) begin
        int exp_v;
        lht_addr = p[$clog2(M*M)-1:0];
        #1;
        exp_v = round_half_up((p % M) * c + (p / M) * s) - mn;
        checks++;
        if (int'(lht_data[t]) != exp_v) begin
          failures++;
          $display("FAIL angle %0d LHT p=%0d got %0d exp %0d", ANGLES[t], p, lht_data[t], exp_v);
        end
      end
      for (int b = 0; b < K * K; b++) begin
        int exp_v;
        ght_addr = b[$clog2(K*K)-1:0];
        #1;
        exp_v = round_half_up(M * ((b % K) * c + (b / K) * s)) + mn + N;
        checks += 2;
        if (int'(ght_data[t]) != exp_v) begin
          failures++;
          $display("FAIL angle %0d GHT b=%0d got %0d exp %0d", ANGLES[t], b, ght_data[t], exp_v);
        end
        if (ght_all[t][b] != ght_data[t]) begin
          failures++;
          $display("FAIL angle %0d ght_all b=%0d", ANGLES[t], b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
