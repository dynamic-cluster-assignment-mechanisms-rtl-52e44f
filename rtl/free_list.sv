// free_list: the pool of unallocated physical registers of one cluster.
//
// Kept as one bit per physical register (1 = free). After reset registers
// 0 .. N_USED-1 hold the initial mappings of the logical registers and the
// rest are free. The renamer reads the whole vector, picks registers
// combinationally and returns them as a mask in alloc_i; those bits are
// cleared at the clock edge. Registers released by committing instructions
// (rel_v_i/rel_p_i, NREL ports) are set at the same edge and can be handed
// out from the next cycle on. Each cluster owns 96 physical registers as in
// the machine this design follows; the bit-vector organisation is this
// design's choice. An assertion flags a release of a register that is
// already free or an allocation of one that is not.
module free_list
  import dcs_pkg::*;
#(
  parameter int unsigned N_PHYS = 96,  // physical registers of the cluster
  parameter int unsigned N_USED = 32,  // registers mapped at reset
  parameter int unsigned NREL   = 8    // release ports (retire width)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_PHYS-1:0] free_o,
  input  logic [N_PHYS-1:0] alloc_i,
  input  logic              rel_v_i [NREL],
  input  preg_t             rel_p_i [NREL],
  output logic [PREG_W:0]   n_free_o
);

  logic [N_PHYS-1:0] free_q;
  logic [N_PHYS-1:0] rel_mask;

  always_comb begin
    rel_mask = '0;
    for (int p = 0; p < int'(NREL); p++)
      if (rel_v_i[p]) rel_mask[rel_p_i[p]] = 1'b1;
    n_free_o = '0;
    for (int i = 0; i < int'(N_PHYS); i++)
      n_free_o += (PREG_W+1)'(free_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_PHYS); i++) free_q[i] <= (i >= int'(N_USED));
    end else begin
      free_q <= (free_q & ~alloc_i) | rel_mask;
    end
  end

  // A register can only be allocated while free and released while in use.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ((alloc_i & ~free_q) == '0)
        else $error("free_list: allocating a register that is not free");
      assert ((rel_mask & free_q) == '0)
        else $error("free_list: releasing a register that is already free");
    end
  end

  assign free_o = free_q;

endmodule
