// dram_model: behavioural model of the FPGA board's external memory, as
// seen through the accelerator's memory port. Not synthesizable.
//
// WORDS 32-bit words, word addressed. A request is accepted when
// req_valid and req_ready are both high; ready is withheld at random in
// stall_pct percent of the cycles to imitate a busy memory controller. A
// read returns its data one cycle after acceptance. Out-of-range accesses
// are counted as errors. Writes can be held back harder than reads
// (wstall_pct) to make write-back the bottleneck. The testbench fills and inspects mem directly.
module dram_model
  import mm_pkg::*;
#(
  parameter int unsigned WORDS = 65536
) (
  input  logic     clk,
  input  logic     rst_n,
  input  int       stall_pct,
  input  int       wstall_pct,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     rsp_valid,
  output fp32_t    rsp_data
);
  fp32_t mem [WORDS];
  int    stalls = 0;      // cycles with a request waiting
  int    bad_addr = 0;
  int    reads = 0, writes = 0;

  logic rdy_rd, rdy_wr;
  always_ff @(posedge clk) begin
    rdy_rd <= ($urandom_range(99, 0) >= stall_pct);
    rdy_wr <= ($urandom_range(99, 0) >= wstall_pct);
  end
  assign req_ready = req.we ? rdy_wr : rdy_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (req_valid && !req_ready) stalls <= stalls + 1;
      if (req_valid && req_ready) begin
        if (req.addr >= addr_t'(WORDS)) begin
          bad_addr <= bad_addr + 1;
          if (!req.we) begin
            rsp_valid <= 1'b1;
            rsp_data  <= '0;
          end
        end else if (req.we) begin
          mem[req.addr] <= req.wdata;
          writes <= writes + 1;
        end else begin
          rsp_valid <= 1'b1;
          rsp_data  <= mem[req.addr];
          reads <= reads + 1;
        end
      end
    end
  end
endmodule
