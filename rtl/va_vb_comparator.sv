// va_vb_comparator: behavioural model (not synthesizable) of the analog
// comparison used by the radix calibration, which needs only the sign of
// VA - VB, the DAC outputs at the calibration codes A2 and B2.
//
// On a rising edge with sample high the model stores the capacitor voltage
// as VA (a sample-and-hold).  On a rising edge with compare high it compares
// the present capacitor voltage, VB, with the stored VA and registers
// va_gt_vb = (VA - VB > OFFSET), valid from the next cycle.  Storing VA
// first and comparing it later with VB, the ideal hold and the input offset
// parameter are this model's own choices.
module va_vb_comparator #(
  parameter real OFFSET = 0.0     // input-referred offset, V
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,     // store vc as VA
  input  logic compare,    // compare vc (VB) with VA
  input  real  vc,         // capacitor voltage
  output logic va_gt_vb    // 1 when VA > VB
);
  real va;

  initial va = 0.0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va_gt_vb <= 1'b0;
    end else begin
      if (sample)  va       <= vc;
      if (compare) va_gt_vb <= (va - vc) > OFFSET;
    end
  end
endmodule
