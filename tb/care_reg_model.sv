// care_reg_model: behavioural model of an external fast control shift
// register clocked by the controller (a CARE control register on an ADB).
// Serial data d is shifted in on each rising edge of sclk; q is the bit that
// leaves next. After N shifts the first bit sent sits in bit 0, as for the
// registers inside the controller.
module care_reg_model #(
  parameter int unsigned N = 16
) (
  input  logic         sclk,
  input  logic         d,
  output logic         q,
  output logic [N-1:0] value
);
  initial value = '0;
  always @(posedge sclk) value <= {d, value[N-1:1]};
  assign q = value[0];
endmodule
