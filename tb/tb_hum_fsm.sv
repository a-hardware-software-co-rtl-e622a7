// tb_hum_fsm: walks every state with every combination of (Ready_cal, Ready_out, Done_out)
// and compares the next state and the {Start_cal, Start_out} outputs with the state table:
// waiting 00 --Ready_cal--> calculating 10 --Ready_out--> sending 01 --Done_out--> waiting.
module tb_hum_fsm;
  import hum_pkg::*;
  logic clk = 0, rst_n = 0, ready_cal = 0, ready_out = 0, done_out = 0;
  logic start_cal, start_out, launch_cal, launch_out;
  hum_state_e state;
  int checks = 0, failures = 0;
  hum_fsm dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // drive the FSM into state s from waiting
  task automatic goto(input hum_state_e s);
    rst_n = 0; {ready_cal, ready_out, done_out} = 3'b000; @(negedge clk); rst_n = 1;
    if (s != WAITING) begin ready_cal = 1; @(negedge clk); ready_cal = 0; end
    if (s == SENDING) begin ready_out = 1; @(negedge clk); ready_out = 0; end
  endtask
  function automatic hum_state_e model(input hum_state_e s, input logic [2:0] in);
    case (s)
      WAITING:     return in[2] ? CALCULATING : WAITING;
      CALCULATING: return in[1] ? SENDING : CALCULATING;
      default:     return in[0] ? WAITING : SENDING;
    endcase
  endfunction
  initial begin
    hum_state_e states [3] = '{WAITING, CALCULATING, SENDING};
    for (int r = 0; r < 4; r++)
      foreach (states[k]) for (int v = 0; v < 8; v++) begin
        goto(states[k]);
        check(state == states[k], "reached state");
        check({start_cal, start_out} == 2'(states[k]), "outputs are the state code");
        {ready_cal, ready_out, done_out} = 3'(v);
        #1;
        check(launch_cal == (states[k] == WAITING && v[2]), "launch_cal strobe");
        check(launch_out == (states[k] == CALCULATING && v[1]), "launch_out strobe");
        @(negedge clk);
        check(state == model(states[k], 3'(v)), $sformatf("from %s with %03b", states[k].name(), v));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
