// Self-checking testbench for bus_arbiter: four requesters raise requests at random and hold
// them for a random tenure once granted. Checks that the grant is one-hot, goes only to a
// requester, stays with the owner while it requests, follows round-robin order (computed
// here from the previous owner), and that the first grant comes one cycle after a request.
module tb_bus_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  bus_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  int tenure [N];
  int last = N - 1;
  int grants [N];
  logic [N-1:0] prev_gnt = '0, prev_req = '0;

  initial begin
    int exp;
    for (int i = 0; i < N; i++) begin tenure[i] = 0; grants[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    req = 4'b0100;
    @(posedge clk); #1;
    chk(gnt == 4'b0100, "first grant one cycle after request");
    last = 2;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // requesters: hold while granted until tenure expires, then drop; raise at random
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin
          if (tenure[i] == 0) tenure[i] = $urandom_range(1, 5);
          else begin
            tenure[i]--;
            if (tenure[i] == 0) req[i] = 1'b0;
          end
        end else if (!req[i] && $urandom_range(0, 3) == 0) req[i] = 1'b1;
      end
      prev_gnt = gnt; prev_req = req;
      @(posedge clk); #1;
      chk($onehot0(gnt), "one-hot");
      chk((gnt & ~prev_req) == '0, "grant only to a requester");
      if (prev_gnt != '0 && (prev_gnt & prev_req) != '0)
        chk(gnt == prev_gnt, "grant held during tenure");
      if (prev_gnt == '0) begin
        exp = -1;
        for (int k = 1; k <= N; k++)
          if (exp < 0 && prev_req[(last + k) % N]) exp = (last + k) % N;
        if (exp >= 0) begin
          chk(gnt == N'(1) << exp, $sformatf("round robin: exp %0d got %b", exp, gnt));
          last = exp; grants[exp]++;
        end else chk(gnt == '0, "no grant without request");
      end
    end
    for (int i = 0; i < N; i++) chk(grants[i] > 50, $sformatf("requester %0d served", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
