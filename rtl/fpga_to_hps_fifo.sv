// FIFO from the FPGA fabric to the hard processor.
//
// FPGA logic pushes DATA_W-bit words as a valid/ready stream; the processor
// pops them with memory-mapped reads over the bridge. A read returns the
// head word one cycle later with `avs_readdatavalid`; reading an empty FIFO
// returns zero and is counted as an underflow. Control and status registers
// on the lightweight bridge (one cycle read latency):
//   address 0  fill level
//   address 1  flags: bit 0 empty, bit 1 full, bit 2 an underflow happened
//   address 2  number of reads of an empty FIFO
//   address 3  FIFO depth
// The register map, depth and read latency are choices of this design.
module fpga_to_hps_fifo #(
  parameter int DATA_W     = 64,
  parameter int DEPTH_LOG2 = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  input  logic              avs_read,
  output logic [DATA_W-1:0] avs_readdata,
  output logic              avs_readdatavalid,
  input  logic [1:0]        csr_address,
  input  logic              csr_read,
  output logic [31:0]       csr_readdata
);
  logic                full, empty;
  logic [DEPTH_LOG2:0] count;
  logic [DATA_W-1:0]   head;
  logic [31:0]         n_udf;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH_LOG2(DEPTH_LOG2)) u_fifo (
    .clk, .rst_n, .wr_en(s_valid), .wdata(s_data), .full,
    .rd_en(avs_read), .rdata(head), .empty, .count);

  assign s_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata      <= '0;
      avs_readdatavalid <= 1'b0;
      n_udf             <= '0;
      csr_readdata      <= '0;
    end else begin
      avs_readdatavalid <= avs_read;
      if (avs_read) begin
        avs_readdata <= empty ? '0 : head;
        if (empty) n_udf <= n_udf + 1;
      end
      if (csr_read) begin
        unique case (csr_address)
          2'd0: csr_readdata <= 32'(count);
          2'd1: csr_readdata <= {29'd0, n_udf != 0, full, empty};
          2'd2: csr_readdata <= n_udf;
          2'd3: csr_readdata <= 32'(1 << DEPTH_LOG2);
        endcase
      end
    end
  end
endmodule
