// tb_aht_edge_buffer: writes random rows into the edge-map buffer and
// checks every row against a copy kept by the testbench, that a write is
// visible one cycle later, that other rows are untouched, and that reset
// clears the map.
module tb_aht_edge_buffer;
  localparam int N = 256;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [$clog2(N)-1:0] wr_row = '0;
  logic [N-1:0] wr_data = '0;
  logic [N-1:0] edge_map [N];
  logic [N-1:0] model [N];
  int checks = 0, failures = 0;

  aht_edge_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_row();
    logic [N-1:0] r;
    for (int w = 0; w < N; w += 32) r[w +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_all(string what);
    for (int r = 0; r < N; r++) begin
      checks++;
      if (edge_map[r] !== model[r]) begin
        failures++;
        $display("FAIL %s row %0d", what, r);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    check_all("after reset");
    // Write every row once, in random order of values.
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = r[$clog2(N)-1:0]; wr_data = rand_row();
      model[r] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (edge_map[r] !== model[r]) begin failures++; $display("FAIL row %0d not visible", r); end
    end
    @(negedge clk) wr_en = 0;
    check_all("full write");
    // Random rewrites, with wr_en low cycles in between.
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_row = $urandom_range(0, N - 1);
      wr_data = rand_row();
      if (wr_en) model[wr_row] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    @(posedge clk); #1;
    check_all("rewrites");
    // Reset clears the map.
    rst_n = 0; #1;
    for (int r = 0; r < N; r++) model[r] = '0;
    check_all("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
