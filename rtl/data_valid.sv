// data_valid: forms the composite dataValid strobe from the three cache controller pulses.
//
// Both the CPU and the FPU watch one dataValid signal built from dataMayBeValid_V3,
// procTagMatch_V3 and dataIsValid_V3, the three pulses the cache controller sends to both
// chips in phase 3. The description states that dataValid is a composite of these three
// signals but not the function; this design takes data as valid when the cache says so
// outright (dataIsValid) or when it says the data may be valid and the tag matched
// (dataMayBeValid and procTagMatch). Purely combinational; the receiver samples the result
// at the edge that ends the cycle, i.e. at the end of phase 3 in the original timing.
module data_valid (
  input  logic data_may_be_valid,   // dataMayBeValid_V3
  input  logic proc_tag_match,      // procTagMatch_V3
  input  logic data_is_valid,       // dataIsValid_V3
  output logic valid                // dataValid
);
  always_comb valid = data_is_valid | (data_may_be_valid & proc_tag_match);
endmodule
