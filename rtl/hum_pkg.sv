// hum_pkg: constants and types shared by the Hardware Update Module (HUM).
//
// The HUM updates N_UNITS weights (or thresholds) at a time. Each update needs
// PARAMS_PER_UNIT IEEE single-precision words, sent in the order
// {old value, learning rate, activation, error}, so one batch is BATCH_WORDS words.
// The controller's three states use the two-bit codes of the state diagram, whose bits are
// {Start_cal, Start_out}.
package hum_pkg;
  localparam int DATA_W          = 32;
  localparam int N_UNITS         = 4;
  localparam int PARAMS_PER_UNIT = 4;
  localparam int BATCH_WORDS     = N_UNITS * PARAMS_PER_UNIT;

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [1:0] {
    WAITING     = 2'b00,
    CALCULATING = 2'b10,
    SENDING     = 2'b01
  } hum_state_e;
endpackage
