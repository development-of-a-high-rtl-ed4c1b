// FIFO from the hard processor to the FPGA fabric.
//
// The processor writes data words into this FIFO through the high-bandwidth
// HPS-to-FPGA bridge (one memory-mapped write pushes one DATA_W-bit word;
// the slave never waits) and the FPGA logic takes them out as a valid/ready
// stream. Its control and status registers sit on the lightweight bridge,
// read with one cycle of latency:
//   address 0  fill level
//   address 1  flags: bit 0 empty, bit 1 full, bit 2 an overflow happened
//   address 2  number of writes dropped because the FIFO was full
//   address 3  FIFO depth
// Streaming data through two such FIFOs over the fast bridge with control on
// the lightweight bridge follows the original prototype; the register map,
// depth and drop-on-full rule are choices of this design.
module hps_to_fpga_fifo #(
  parameter int DATA_W     = 64,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              avs_write,
  input  logic [DATA_W-1:0] avs_writedata,
  input  logic [1:0]        csr_address,
  input  logic              csr_read,
  output logic [31:0]       csr_readdata,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [DATA_W-1:0] m_data
);
  logic                full, empty;
  logic [DEPTH_LOG2:0] count;
  logic [31:0]         n_ovf;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .clk, .rst_n, .wr_en(avs_write), .wdata(avs_writedata), .full,
    .rd_en(m_ready), .rdata(m_data), .empty, .count);

  assign m_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_ovf        <= '0;
      csr_readdata <= '0;
    end else begin
      if (avs_write && full) n_ovf <= n_ovf + 1;
      if (csr_read) begin
        unique case (csr_address)
          2'd0: csr_readdata <= 32'(count);
          2'd1: csr_readdata <= {29'd0, n_ovf != 0, full, empty};
          2'd2: csr_readdata <= n_ovf;
          2'd3: csr_readdata <= 32'(1 << DEPTH_LOG2);
        endcase
      end
    end
  end
endmodule
