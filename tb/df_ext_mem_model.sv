// df_ext_mem_model: behavioural model of the external frame-buffer memory.
//
// Not synthesizable logic: a testbench stand-in for the DRAM that holds the
// depth-filter planes and the z-buffer. A request (req, we, addr, wdata) is
// held by the master until ack; the model answers LATENCY cycles after it
// sees the request, with a one-cycle ack and, for a read, rdata valid in the
// same cycle. clear (one cycle) sets every word to CLEAR_VAL, the way a
// frame-buffer clear sets the z-buffer to the far plane. It counts reads and
// writes so a testbench can measure the traffic.
module df_ext_mem_model #(
  parameter int unsigned AW        = 12,
  parameter int unsigned DW        = 128,
  parameter int unsigned LATENCY   = 2,
  parameter logic [DW-1:0] CLEAR_VAL = '0
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic          ack,
  output logic [DW-1:0] rdata,
  output int unsigned   n_reads,
  output int unsigned   n_writes
);

  logic [DW-1:0] mem [1 << AW];
  int unsigned   wait_cnt;

  initial begin
    ack = 1'b0; rdata = '0; wait_cnt = 0; n_reads = 0; n_writes = 0;
    // arbitrary power-up contents
    for (int i = 0; i < (1 << AW); i++) mem[i] = {($bits(mem[i]) + 31) / 32 {$urandom}};
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (clear) begin
      for (int i = 0; i < (1 << AW); i++) mem[i] = CLEAR_VAL;
      wait_cnt <= 0;
    end else if (req && !ack) begin
      if (wait_cnt >= LATENCY) begin
        wait_cnt <= 0;
        ack      <= 1'b1;
        if (we) begin
          mem[addr] <= wdata;
          n_writes  <= n_writes + 1;
        end else begin
          rdata   <= mem[addr];
          n_reads <= n_reads + 1;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end

endmodule
