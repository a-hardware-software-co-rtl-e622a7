// hum_counter1: input side of the HUM, counter1 with its storage controller.
//
// Fetches BATCH_WORDS (16) parameter words from the FSL0 slave port into 16 local registers,
// one word per clock. A word is taken whenever FSL0_S_Exists is '1' and the register bank
// still has room; FSL0_S_Read is raised in that same clock so the FIFO drops the word.
// counter1 counts the stored words 1..16 and steps to 17 on the clock after the last word;
// Ready_cal is '1' while the count is 17. The 'consume' pulse (the controller starting a
// calculation, which latches the operands into the update units) clears the count so the
// next batch may stream in while the current one is being computed.
//
// Interface: FSL0 slave signals (data, exists, read), params[16] and ready_cal.
// Timing: 16 clocks for a batch when the FIFO never runs dry, Ready_cal one clock later.
// The count of 17 and the Exists/Read coupling follow the document; holding the full batch
// (no reads while the count is 16 or 17) until it is consumed is this design's choice.
module hum_counter1
  import hum_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t fsl_s_data,
  input  logic  fsl_s_exists,
  output logic  fsl_s_read,
  input  logic  consume,
  output word_t params [BATCH_WORDS],
  output logic  ready_cal
);
  localparam int CW = $clog2(BATCH_WORDS + 2);

  logic [CW-1:0] count;

  always_comb begin
    fsl_s_read = fsl_s_exists && (count < CW'(BATCH_WORDS));
    ready_cal  = (count == CW'(BATCH_WORDS + 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < BATCH_WORDS; i++) params[i] <= '0;
    end else begin
      if (consume) begin
        count <= '0;
      end else if (fsl_s_read) begin
        params[count[$clog2(BATCH_WORDS)-1:0]] <= fsl_s_data;
        count <= count + 1'b1;
      end else if (count == CW'(BATCH_WORDS)) begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
