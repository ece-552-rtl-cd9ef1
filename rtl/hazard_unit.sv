// hazard_unit: read-after-write interlock for the WISC-F05 pipeline.
//
// The pipeline has no forwarding network, so an instruction in decode must
// wait until every older instruction that writes one of its source
// registers has reached write-back (where the register file passes the new
// value straight through to the read ports). This block compares the
// decode-stage sources with the destinations of the instructions in the
// execute and memory stages and raises stall while any of them matches.
// Combinational; one comparison per (source, stage) pair.
module hazard_unit (
  input  logic       id_valid,
  input  logic [3:0] id_ra,
  input  logic       id_use_a,
  input  logic [3:0] id_rb,
  input  logic       id_use_b,
  input  logic       ex_we,     // valid instruction in execute writes ex_rd
  input  logic [3:0] ex_rd,
  input  logic       mem_we,    // valid instruction in memory writes mem_rd
  input  logic [3:0] mem_rd,
  output logic       stall
);

  logic hit_a, hit_b;

  always_comb begin
    hit_a = id_use_a && ((ex_we && ex_rd == id_ra) || (mem_we && mem_rd == id_ra));
    hit_b = id_use_b && ((ex_we && ex_rd == id_rb) || (mem_we && mem_rd == id_rb));
    stall = id_valid && (hit_a || hit_b);
  end

endmodule
