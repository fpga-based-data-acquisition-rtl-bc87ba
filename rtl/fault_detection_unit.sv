// fault_detection_unit: threshold-based fault detector for the three sensor readings.
//
// fault_flag = (temp > TEMP_TH) | (volt > VOLT_TH) | (curr > CURR_TH), with the default
// thresholds 200, 180 and 150. A reading equal to its threshold is still normal. The three
// individual comparison results are also brought out (fault_bits = {temp, volt, curr}) so a
// monitor can tell which limit was crossed.
//
// Interface: three 8-bit readings in, fault_flag and fault_bits out. Timing: combinational;
// the flag rises in the same cycle a reading crosses its threshold and stays high exactly as
// long as at least one reading is out of range, clearing itself when all three return to
// normal. The equation, the thresholds and the self-clearing behaviour follow the
// specification; the per-sensor fault_bits output is this design's addition for diagnosis.
module fault_detection_unit
  import daq_pkg::*;
#(
  parameter sample_t TEMP_TH = TEMP_THRESHOLD,
  parameter sample_t VOLT_TH = VOLT_THRESHOLD,
  parameter sample_t CURR_TH = CURR_THRESHOLD
) (
  input  sample_t    temp,
  input  sample_t    volt,
  input  sample_t    curr,
  output logic [2:0] fault_bits,
  output logic       fault_flag
);

  always_comb begin
    fault_bits[2] = temp > TEMP_TH;
    fault_bits[1] = volt > VOLT_TH;
    fault_bits[0] = curr > CURR_TH;
    fault_flag    = |fault_bits;
  end

endmodule
