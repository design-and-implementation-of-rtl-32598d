// uid_comparator: decides whether a card UID is the authorised one.
//
// Compares the 32-bit UID read from the card with the stored UID, given as the
// STORED_UID parameter, and raises match when all bits agree.  Purely
// combinational; the controller samples match in the cycle after it has
// loaded a new UID.
//
// The comparison against a stored UID follows the design description.  Its
// leading byte 0xDE is the one given for the stored UID; the remaining bytes
// of the default (0xDEADBEEF) are this design's choice.
module uid_comparator #(
  parameter logic [31:0] STORED_UID = 32'hDEAD_BEEF
) (
  input  logic [31:0] uid,
  output logic        match
);

  always_comb match = (uid == STORED_UID);

endmodule
