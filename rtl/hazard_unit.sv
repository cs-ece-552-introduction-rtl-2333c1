// hazard_unit: forwarding and load-use stall detection for the WISC-SP22
// five-stage pipeline.
//
// Forwarding (for the instruction in EX):
//   EX->EX  : the result held in the EX/MEM register (instruction now in MEM)
//   MEM->EX : the write-back value held in the MEM/WB register (in WB)
// The youngest producer wins. Register R-file bypassing covers the case of a
// producer in WB and a consumer in ID, so no third path is needed.
// A load in EX whose destination is read by the instruction in ID cannot be
// forwarded in time: load_use asks the pipeline to hold ID/IF for one cycle
// and insert a bubble into EX; the value then arrives by MEM->EX forwarding.
// Purely combinational. The paths are the two the specification requires;
// the priority and the one-cycle load-use stall are the usual choice.
module hazard_unit
  import wisc_pkg::*;
(
  // instruction in ID
  input  reg_t id_rs,
  input  reg_t id_rt,
  input  logic id_use_rs,
  input  logic id_use_rt,
  // instruction in EX
  input  reg_t ex_rs,
  input  reg_t ex_rt,
  input  logic ex_use_rs,
  input  logic ex_use_rt,
  input  reg_t ex_rd,
  input  logic ex_reg_wr,
  input  logic ex_mem_rd,
  // instruction in MEM
  input  reg_t mem_rd,
  input  logic mem_reg_wr,
  // instruction in WB
  input  reg_t wb_rd,
  input  logic wb_reg_wr,
  output fwd_e fwd_a,
  output fwd_e fwd_b,
  output logic load_use
);
  function automatic fwd_e sel(reg_t r, logic use_r, reg_t mrd, logic mwr, reg_t wrd, logic wwr);
    if (use_r && mwr && mrd == r)      return FWD_EXMEM;
    else if (use_r && wwr && wrd == r) return FWD_MEMWB;
    else                               return FWD_RF;
  endfunction

  assign fwd_a = sel(ex_rs, ex_use_rs, mem_rd, mem_reg_wr, wb_rd, wb_reg_wr);
  assign fwd_b = sel(ex_rt, ex_use_rt, mem_rd, mem_reg_wr, wb_rd, wb_reg_wr);

  assign load_use = ex_mem_rd && ex_reg_wr &&
                    ((id_use_rs && id_rs == ex_rd) || (id_use_rt && id_rt == ex_rd));
endmodule
