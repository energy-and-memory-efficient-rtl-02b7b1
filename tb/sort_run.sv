// Testbench helper: builds the combined top at one size (N = 2^NB keys, p = 2^LB lanes,
// W-bit keys), sends FRAMES sequences to each of the two sorters and checks every output
// key against the sequence sorted here. The high-throughput sorter gets its sequences back
// to back and its latency is checked against the stage latencies worked out here; the
// resource-efficient sorter gets them through its handshake. Sequence kinds cycle through
// random keys (full width), many equal keys, sorted and reverse-sorted keys. done rises
// when both sorters have returned every sequence; checks and failures count the results.
module sort_run #(
  parameter int NB = 4,
  parameter int LB = 2,
  parameter int W = 8,
  parameter int FRAMES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 1 << NB, P = 1 << LB, C = N / P;

  logic ht_in_sob, ht_in_valid, ht_out_valid, ht_out_sob;
  logic re_in_ready, re_in_valid, re_out_valid, re_out_sob;
  logic [W-1:0] ht_in_key [P], ht_out_key [P], re_in_key [P], re_out_key [P];

  bitonic_sorters #(.N_BITS(NB), .LANE_BITS(LB), .W(W)) dut (
    .clk(clk), .rst_n(rst_n),
    .ht_in_sob(ht_in_sob), .ht_in_valid(ht_in_valid), .ht_in_key(ht_in_key),
    .ht_out_valid(ht_out_valid), .ht_out_sob(ht_out_sob), .ht_out_key(ht_out_key),
    .re_in_ready(re_in_ready), .re_in_valid(re_in_valid), .re_in_key(re_in_key),
    .re_out_valid(re_out_valid), .re_out_sob(re_out_sob), .re_out_key(re_out_key)
  );

  logic [W-1:0] frames_in [FRAMES][N];
  logic [W-1:0] sorted_ref [FRAMES][N];
  longint cycle = 0;
  longint ht_start [FRAMES];
  int ht_frame = 0, ht_idx = 0, re_frame = 0, re_idx = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int ht_latency();
    int jl[$];
    int lat;
    for (int i = 1; i <= NB; i++)
      for (int j = i - 1; j >= 0; j--) jl.push_back(j);
    lat = jl.size();
    for (int s = 0; s + 1 < jl.size(); s++) begin
      int m;
      m = (jl[s] > jl[s+1]) ? jl[s] : jl[s+1];
      lat += (m < LB) ? 1 : ((1 << (m + 1)) / P + 2);
    end
    return lat;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int f = 0; f < FRAMES; f++) begin
      automatic logic [W-1:0] q[$];
      for (int i = 0; i < N; i++) begin
        logic [W-1:0] r;
        r = '0;
        for (int b = 0; b < W; b += 32) r = (r << 32) | W'($urandom);
        case (f % 4)
          0: frames_in[f][i] = r;
          1: frames_in[f][i] = W'(r % 5);
          2: frames_in[f][i] = W'(i);
          default: frames_in[f][i] = ~W'(i);
        endcase
        q.push_back(frames_in[f][i]);
      end
      q.sort();
      for (int i = 0; i < N; i++) sorted_ref[f][i] = q[i];
    end
  end

  // high-throughput: sequences back to back from the first slot after reset
  initial begin
    ht_in_valid = 0;
    foreach (ht_in_key[l]) ht_in_key[l] = '0;
    wait (rst_n);
    @(negedge clk);
    while (!ht_in_sob) @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      ht_start[f] = cycle;
      for (int c = 0; c < C; c++) begin
        ht_in_valid = 1;
        for (int l = 0; l < P; l++) ht_in_key[l] = frames_in[f][c * P + l];
        @(negedge clk);
      end
    end
    ht_in_valid = 0;
  end

  // resource-efficient: through the handshake
  initial begin
    re_in_valid = 0;
    foreach (re_in_key[l]) re_in_key[l] = '0;
    wait (rst_n);
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      int c;
      c = 0;
      while (c < C) begin
        re_in_valid = 1;
        for (int l = 0; l < P; l++) re_in_key[l] = frames_in[f][c * P + l];
        @(posedge clk);
        if (re_in_ready) c++;
        @(negedge clk);
      end
      re_in_valid = 0;
    end
  end

  initial begin
    int lat;
    lat = ht_latency();
    forever begin
      @(posedge clk);
      #1;
      if (ht_out_valid && ht_frame < FRAMES) begin
        if (ht_idx == 0) begin
          checks++;
          if (!ht_out_sob || cycle - ht_start[ht_frame] != lat) begin
            failures++;
            $display("FAIL N=%0d ht sequence %0d start or latency", N, ht_frame);
          end
        end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (ht_out_key[l] != sorted_ref[ht_frame][ht_idx + l]) begin
            failures++;
            if (failures < 5) $display("FAIL N=%0d ht sequence %0d key %0d", N, ht_frame, ht_idx + l);
          end
        end
        ht_idx += P;
        if (ht_idx == N) begin ht_idx = 0; ht_frame++; end
      end
      if (re_out_valid && re_frame < FRAMES) begin
        checks++;
        if (re_out_sob != (re_idx == 0)) begin failures++; $display("FAIL N=%0d re out_sob", N); end
        for (int l = 0; l < P; l++) begin
          checks++;
          if (re_out_key[l] != sorted_ref[re_frame][re_idx + l]) begin
            failures++;
            if (failures < 5) $display("FAIL N=%0d re sequence %0d key %0d", N, re_frame, re_idx + l);
          end
        end
        re_idx += P;
        if (re_idx == N) begin re_idx = 0; re_frame++; end
      end
      if (ht_frame == FRAMES && re_frame == FRAMES) done = 1;
    end
  end
endmodule
