// memristor_pbp_cell: BEHAVIOURAL MODEL of one weight of the memristor-based
// perceptron predictor (one history bit), covering both the prediction and
// the update circuitry. Not synthesizable; real-valued line quantities.
//
// The weight is a complementary pair: the primary memristor holds the
// weight and the complementary one its complement.
// Prediction (PREDICT high): both devices are powered from VDD and their
// currents are steered by the history bit. For a taken history the primary
// current goes to the Taken line and the complementary current to the
// Not-taken line; for a not-taken history the two are swapped. A strong
// positive weight (primary on, complement off) therefore raises the Taken
// line for taken history, and the Not-taken line for not-taken history,
// which is the perceptron product h*W in current form.
// Update (UPDATE high): the XOR of history and outcome sets the direction
// of the programming voltage. When they agree the primary device is
// strengthened (turned on) and the complementary one weakened; when they
// differ, the other way round. One programming step is taken per UPDATE
// pulse.
// Ports: w_to_taken / w_to_not_taken give the state of the device steered
// onto each line (or -1 when nothing is steered there, i.e. not predicting)
// so that the shared readout can solve the line voltages; v_taken /
// v_not_taken feed those voltages back so that the cell reports its own
// currents. The steering and the update directions follow the 1-bit circuit
// description; the transistor switches themselves are idealised.
module memristor_pbp_cell
  import memristor_pkg::*;
#(
  parameter real W_INIT = 0.5
) (
  input  logic PREDICT,
  input  logic UPDATE,
  input  logic HISTORY,        // 1 = taken
  input  logic OUTCOME,        // 1 = taken
  input  real  v_taken,        // Taken line voltage (from the readout)
  input  real  v_not_taken,    // Not-taken line voltage
  output real  w_to_taken,     // state steered onto the Taken line, -1 if none
  output real  w_to_not_taken, // state steered onto the Not-taken line, -1 if none
  output real  i_taken,        // current this cell sources into the Taken line (A)
  output real  i_not_taken,    // current into the Not-taken line (A)
  output real  w_primary,      // state of the primary device
  output real  w_complement    // state of the complementary device
);
  real  v_pm, v_nm, i_pm, i_nm;
  logic agree;

  assign agree = ~(HISTORY ^ OUTCOME);

  always_comb begin
    if (UPDATE) begin
      // agree: +VDD across the primary (on), -VDD across the complement (off)
      v_pm = agree ? VDD : -VDD;
      v_nm = agree ? -VDD : VDD;
    end else if (PREDICT) begin
      v_pm = VDD - (HISTORY ? v_taken : v_not_taken);
      v_nm = VDD - (HISTORY ? v_not_taken : v_taken);
    end else begin
      v_pm = 0.0;
      v_nm = 0.0;
    end
  end

  memristor #(.W_INIT(W_INIT)) u_pm (.v(v_pm), .prog(UPDATE), .i(i_pm), .w(w_primary));
  memristor #(.W_INIT(W_INIT)) u_nm (.v(v_nm), .prog(UPDATE), .i(i_nm), .w(w_complement));

  always_comb begin
    if (PREDICT && !UPDATE) begin
      w_to_taken     = HISTORY ? w_primary : w_complement;
      w_to_not_taken = HISTORY ? w_complement : w_primary;
      i_taken        = HISTORY ? i_pm : i_nm;
      i_not_taken    = HISTORY ? i_nm : i_pm;
    end else begin
      w_to_taken     = -1.0;
      w_to_not_taken = -1.0;
      i_taken        = 0.0;
      i_not_taken    = 0.0;
    end
  end
endmodule
