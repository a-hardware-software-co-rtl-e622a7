// fsl_fifo_model: behavioural model of a Fast Simplex Link channel, for simulation only.
//
// A synchronous FIFO of DEPTH words with the channel's master side (FSL_M_Data,
// FSL_M_Control, FSL_M_Write, FSL_M_Full) and slave side (FSL_S_Data, FSL_S_Control,
// FSL_S_Read, FSL_S_Exists), both on one clock. The slave side shows the oldest word while
// Exists is high; Read pops it. A write into a full FIFO is dropped and counted.
module fsl_fifo_model #(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] FSL_M_Data,
  input  logic        FSL_M_Control,
  input  logic        FSL_M_Write,
  output logic        FSL_M_Full,
  output logic [31:0] FSL_S_Data,
  output logic        FSL_S_Control,
  input  logic        FSL_S_Read,
  output logic        FSL_S_Exists,
  output int          dropped
);
  logic [32:0] mem [DEPTH];
  int rd, wr, cnt;

  always_comb begin
    FSL_M_Full   = (cnt == DEPTH);
    FSL_S_Exists = (cnt != 0);
    {FSL_S_Control, FSL_S_Data} = mem[rd];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd <= 0; wr <= 0; cnt <= 0; dropped <= 0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      automatic bit do_w = FSL_M_Write && (cnt != DEPTH);
      automatic bit do_r = FSL_S_Read && (cnt != 0);
      if (FSL_M_Write && cnt == DEPTH) dropped <= dropped + 1;
      if (do_w) begin mem[wr] <= {FSL_M_Control, FSL_M_Data}; wr <= (wr + 1) % DEPTH; end
      if (do_r) rd <= (rd + 1) % DEPTH;
      cnt <= cnt + int'(do_w) - int'(do_r);
    end
  end
endmodule
