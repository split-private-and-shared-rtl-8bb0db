// Behavioural model of the off-chip main memory (not synthesizable, testbench only).
//
// A sparse line store with a fixed access latency: a request (mem_req held high) is
// answered with a one-cycle mem_ack LAT cycles after it is first seen; a read returns the
// line, a write stores mem_wdata. A line never written reads as the pattern of
// init_line(), so testbenches can compute the expected contents independently. The
// default latency of 200 cycles is the memory latency of the evaluated configuration.
module mem_model
  import sps2_pkg::*;
#(
  parameter int unsigned LAT = 200
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   mem_req,
  input  logic   mem_we,
  input  laddr_t mem_laddr,
  input  line_t  mem_wdata,
  output logic   mem_ack,
  output line_t  mem_rdata
);

  line_t store [laddr_t];
  int unsigned cnt;
  int unsigned n_reads, n_writes;

  // word k of an untouched line
  function automatic word_t init_word(laddr_t la, int k);
    return {32'(la), 32'hC0DE_0000 | 32'(k)};
  endfunction

  function automatic line_t init_line(laddr_t la);
    line_t l;
    for (int k = 0; k < LINE_W / WORD_W; k++) l[k*WORD_W +: WORD_W] = init_word(la, k);
    return l;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; mem_ack <= 1'b0; mem_rdata <= '0; n_reads <= 0; n_writes <= 0;
    end else begin
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        if (cnt + 2 >= LAT) begin
          cnt     <= 0;
          mem_ack <= 1'b1;
          if (mem_we) begin
            store[mem_laddr] = mem_wdata;
            n_writes <= n_writes + 1;
          end else begin
            mem_rdata <= store.exists(mem_laddr) ? store[mem_laddr] : init_line(mem_laddr);
            n_reads <= n_reads + 1;
          end
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end

endmodule
