// shifter: 16-bit barrel shifter for the WISC-SP22 shift and rotate
// instructions (ROL, SLL, ROR, SRL and their immediate forms).
//
// The amount is the low four bits of Rt or of the immediate. The shifter is
// four cascaded stages that each shift or rotate by 1, 2, 4 or 8 positions
// when the matching amount bit is set; op uses the same code as the
// R-format opcode extension (00 rotate left, 01 shift left logical,
// 10 rotate right, 11 shift right logical). Purely combinational. The
// log-stage structure is this design's choice.
module shifter
  import wisc_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]         in,
  input  logic [$clog2(WIDTH)-1:0] amt,
  input  shift_op_e                op,
  output logic [WIDTH-1:0]         out
);
  localparam int unsigned STAGES = $clog2(WIDTH);

  logic [WIDTH-1:0] stage [STAGES+1];
  logic             left, rotate;

  assign left   = (op == SH_ROL) || (op == SH_SLL);
  assign rotate = (op == SH_ROL) || (op == SH_ROR);

  assign stage[0] = in;
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned N = 1 << s;
    logic [WIDTH-1:0] shifted;
    always_comb begin
      if (left)
        shifted = rotate ? {stage[s][WIDTH-1-N:0], stage[s][WIDTH-1 -: N]}
                         : {stage[s][WIDTH-1-N:0], {N{1'b0}}};
      else
        shifted = rotate ? {stage[s][N-1:0], stage[s][WIDTH-1:N]}
                         : {{N{1'b0}}, stage[s][WIDTH-1:N]};
    end
    assign stage[s+1] = amt[s] ? shifted : stage[s];
  end

  assign out = stage[STAGES];
endmodule
