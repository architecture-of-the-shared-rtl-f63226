// tmr_channel_select: chooses which of the three redundant boards (A, B, C) drives
// the trolley's motors.
//
// Each board compares its results with the other two and raises a fault flag for
// each neighbour it disagrees with: XF1 and XF2 of board X. The flags are paired per
// link between two boards, (AF2, BF1) for A-B, (AF1, CF2) for A-C and (BF2, CF1) for
// B-C, and either flag of a pair marks that link as disagreeing. A board is judged
// faulty when both of its links disagree, i.e. the other two outvote it. The output
// selects A if A is not faulty, otherwise B, otherwise C, one-hot in sel. With one
// board removed or faulty the other two still select a board, and a later
// disagreement between them shows on the link signal (fault detection in the
// two-board state). none_healthy is raised when every board is judged faulty.
// Purely combinational.
//
// The flag names and their pairing into three gates feeding the channel select
// logic follow the reference drawing. What a flag means, how a pair is combined and
// the A-then-B-then-C decision rule are this design's own reading.
module tmr_channel_select (
  input  logic [1:0] af,           // {AF2, AF1}
  input  logic [1:0] bf,           // {BF2, BF1}
  input  logic [1:0] cf,           // {CF2, CF1}
  output logic [2:0] sel,          // one-hot {C, B, A}
  output logic [2:0] faulty,       // {C, B, A} judged faulty
  output logic [2:0] link_bad,     // {B-C, A-C, A-B} links disagreeing
  output logic       none_healthy
);

  logic ab, ac, bc;

  always_comb begin
    ab = af[1] || bf[0];   // AF2, BF1
    ac = af[0] || cf[1];   // AF1, CF2
    bc = bf[1] || cf[0];   // BF2, CF1
    link_bad = {bc, ac, ab};
    faulty   = {ac && bc, ab && bc, ab && ac};
    sel      = '0;
    if      (!faulty[0]) sel = 3'b001;
    else if (!faulty[1]) sel = 3'b010;
    else if (!faulty[2]) sel = 3'b100;
    none_healthy = (sel == '0);
  end

endmodule
