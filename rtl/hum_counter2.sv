// hum_counter2: output side of the HUM, counter2 with its output controller.
//
// While Start_out is '1' the four updated values are written to the FSL1 master port, one per
// clock, with FSL1_M_Write = '1'. counter2 counts the words sent; when all four are out,
// Done_out is raised for one clock. When FSL1_M_Full is '1' no word is written and the count
// holds, so the transfer stalls until the FIFO has room. FSL1_M_Control is always '0'
// (every word is a data word). The count clears whenever Start_out is '0'.
//
// Timing: with no back-pressure, Write is high for four clocks and Done_out follows in the
// fifth clock of the sending state.
// The one-word-per-clock transfer follows the document; stalling on Full is this design's
// choice, as the source only says that Full rises when the FIFO is full.
module hum_counter2
  import hum_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_out,
  input  word_t results [N_UNITS],
  input  logic  fsl_m_full,
  output word_t fsl_m_data,
  output logic  fsl_m_write,
  output logic  fsl_m_control,
  output logic  done_out
);
  localparam int CW = $clog2(N_UNITS + 1);

  logic [CW-1:0] count;

  always_comb begin
    fsl_m_write   = start_out && (count < CW'(N_UNITS)) && !fsl_m_full;
    fsl_m_data    = results[count[$clog2(N_UNITS)-1:0]];
    fsl_m_control = 1'b0;
    done_out      = start_out && (count == CW'(N_UNITS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !start_out) count <= '0;
    else if (fsl_m_write)     count <= count + 1'b1;
  end
endmodule
