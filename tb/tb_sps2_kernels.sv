// Shared-memory kernels on sps2_top at its default sizes (4 nodes, 64 KB PL1, 0.5 MB PL2,
// 2 MB SL2, 200-cycle memory). Four processor models run, through their processor ports
// only, the communication patterns of two SPLASH-2 programs at reduced sizes:
//   * radix sort: 2048 8-bit keys, two passes of a 4-bit digit. Each processor builds the
//     histogram of its quarter of the keys, reads every processor's histogram to compute its
//     output offsets, and scatters its keys into the shared destination array.
//   * FFT transpose: a 128 x 128 matrix distributed by rows. Each processor updates its own
//     rows (leaving them dirty in its caches), then builds its rows of the transpose by
//     reading columns owned by the others.
// Phases are separated by barriers made of one flag line per processor, which each
// processor writes and then polls for the others' flags; they only finish if stores become
// visible to the other nodes. At the end processor 0 reads both results through its own
// caches, and they are compared with a sort and a transpose computed here. The two
// 128 KB matrices overflow the PL1s, so lines also travel through the PL2s and the SL2,
// both over the bus and through the SL2 read ports; the test fails if no line moved
// between caches or came from the SL2. Cycle counts of both kernels are printed.
module tb_sps2_kernels;
  import sps2_pkg::*;
  localparam int N = 4;
  localparam int K = 2048;             // keys
  localparam int R = 128;              // matrix rows and columns

  localparam addr_t KEYS_A = 32'h0010_0000;
  localparam addr_t KEYS_B = 32'h0011_0000;
  localparam addr_t HIST   = 32'h0012_0000;
  localparam addr_t FLAGS  = 32'h0013_0000;
  localparam addr_t MAT    = 32'h0020_0000;
  localparam addr_t TRN    = 32'h0030_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready;
  logic [N-1:0] cpu_req = '0, cpu_we = '0, cpu_ready;
  addr_t [N-1:0] cpu_addr = '0; word_t [N-1:0] cpu_wdata = '0, cpu_rdata;
  logic mem_req, mem_we, mem_ack; laddr_t mem_laddr; line_t mem_wdata, mem_rdata;

  sps2_top dut (.*);
  mem_model u_mem (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  // processor port of node n
  task automatic load(int n, addr_t a, output word_t d);
    @(negedge clk);
    cpu_req[n] = 1; cpu_we[n] = 0; cpu_addr[n] = a;
    do @(negedge clk); while (!cpu_ready[n]);
    d = cpu_rdata[n];
    cpu_req[n] = 0;
  endtask
  task automatic store(int n, addr_t a, word_t d);
    @(negedge clk);
    cpu_req[n] = 1; cpu_we[n] = 1; cpu_addr[n] = a; cpu_wdata[n] = d;
    do @(negedge clk); while (!cpu_ready[n]);
    cpu_req[n] = 0;
  endtask

  // barrier: publish generation g in my flag line, wait until every flag reaches g
  int n_polls = 0;
  task automatic barrier(int n, int g);
    word_t f;
    store(n, FLAGS + addr_t'(64 * n), word_t'(g));
    for (int j = 0; j < N; j++) begin
      do begin load(n, FLAGS + addr_t'(64 * j), f); n_polls++; end while (int'(f) < g);
    end
  endtask

  function automatic int key_of(int k);     // fixed pseudo-random keys
    return int'((32'(k) * 32'd2654435761 + 32'd12345) >> 13) & 8'hFF;
  endfunction
  function automatic word_t mat_of(int r, int c);
    return word_t'(r * 1000 + c);
  endfunction

  // how the lines moved
  int n_rdhit = 0, n_c2c = 0, n_sl2sup = 0;
  always @(posedge clk) begin
    n_rdhit += $countones(dut.u_sl2.rd_done & dut.u_sl2.rd_hit);
    if (dut.u_bus.any_sup) n_c2c++;
    if (dut.u_sl2.done && dut.u_sl2.hit && dut.u_bus.cmd_q != BUS_PSL2) n_sl2sup++;
  end

  int t_phase [8];
  int n_done = 0;

  for (genvar n = 0; n < N; n++) begin : g_proc
    initial begin
      word_t d, h;
      int off [16];
      int lo, hi, g, dig;
      addr_t src, dst;
      lo = n * (K / N); hi = lo + K / N;
      g = 0;
      wait (rst_n && ready);
      // set-up: my keys, my matrix rows, my histogram cleared
      for (int k = lo; k < hi; k++) store(n, KEYS_A + addr_t'(8 * k), word_t'(key_of(k)));
      for (int r = n * (R / N); r < (n + 1) * (R / N); r++)
        for (int c = 0; c < R; c++) store(n, MAT + addr_t'(8 * (r * R + c)), mat_of(r, c));
      for (int b = 0; b < 16; b++) store(n, HIST + addr_t'(8 * (n * 16 + b)), '0);
      g++; barrier(n, g);
      if (n == 0) t_phase[0] = int'($time / 10);

      // radix sort, two passes
      for (int p = 0; p < 2; p++) begin
        src = p ? KEYS_B : KEYS_A;
        dst = p ? KEYS_A : KEYS_B;
        for (int k = lo; k < hi; k++) begin
          load(n, src + addr_t'(8 * k), d);
          dig = (int'(d) >> (4 * p)) & 15;
          load(n, HIST + addr_t'(8 * (n * 16 + dig)), h);
          store(n, HIST + addr_t'(8 * (n * 16 + dig)), h + 1);
        end
        g++; barrier(n, g);
        // offsets: all keys with a smaller digit, then same digit of lower processors
        for (int b = 0; b < 16; b++) off[b] = 0;
        for (int b = 0; b < 16; b++)
          for (int j = 0; j < N; j++) begin
            load(n, HIST + addr_t'(8 * (j * 16 + b)), h);
            for (int b2 = b + 1; b2 < 16; b2++) off[b2] += int'(h);
            if (j < n) off[b] += int'(h);
          end
        for (int k = lo; k < hi; k++) begin
          load(n, src + addr_t'(8 * k), d);
          dig = (int'(d) >> (4 * p)) & 15;
          store(n, dst + addr_t'(8 * off[dig]), d);
          off[dig]++;
        end
        g++; barrier(n, g);
        for (int b = 0; b < 16; b++) store(n, HIST + addr_t'(8 * (n * 16 + b)), '0);
        g++; barrier(n, g);
      end
      if (n == 0) t_phase[1] = int'($time / 10);

      // transpose: update my rows, then gather my rows of the transpose
      for (int r = n * (R / N); r < (n + 1) * (R / N); r++)
        for (int c = 0; c < R; c++) begin
          load(n, MAT + addr_t'(8 * (r * R + c)), d);
          store(n, MAT + addr_t'(8 * (r * R + c)), 3 * d + 1);
        end
      g++; barrier(n, g);
      for (int r = n * (R / N); r < (n + 1) * (R / N); r++)
        for (int c = 0; c < R; c++) begin
          load(n, MAT + addr_t'(8 * (c * R + r)), d);
          store(n, TRN + addr_t'(8 * (r * R + c)), d);
        end
      g++; barrier(n, g);
      if (n == 0) t_phase[2] = int'($time / 10);

      // processor 0 reads the results
      if (n == 0) begin
        int ref_keys [$];
        for (int k = 0; k < K; k++) ref_keys.push_back(key_of(k));
        ref_keys.sort();
        for (int k = 0; k < K; k++) begin
          load(0, KEYS_A + addr_t'(8 * k), d);
          chk(int'(d) == ref_keys[k], $sformatf("sorted key %0d: %0d, expected %0d", k, d, ref_keys[k]));
        end
        for (int r = 0; r < R; r++)
          for (int c = 0; c < R; c++) begin
            load(0, TRN + addr_t'(8 * (r * R + c)), d);
            chk(d == 3 * mat_of(c, r) + 1, $sformatf("transpose %0d,%0d", r, c));
          end
      end
      n_done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_done == N);
    chk(u_mem.n_reads > 0 && n_polls > 0, "memory used and barriers polled");
    chk(n_c2c > 0 && n_rdhit + n_sl2sup > 0, "lines moved between caches and from the SL2");
    $display("radix sort %0d cycles, transpose %0d cycles, barrier polls %0d",
             t_phase[1] - t_phase[0], t_phase[2] - t_phase[1], n_polls);
    $display("cache-to-cache %0d, SL2 read port hits %0d, SL2 hits on the bus %0d, memory reads %0d",
             n_c2c, n_rdhit, n_sl2sup, u_mem.n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
