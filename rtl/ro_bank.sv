// ro_bank: behavioural model of the victim-side bank of ring oscillators, the
// controlled source of supply-voltage drops.
//
// This is a behavioural model, not synthesizable logic. On the FPGA each of the
// N_RO oscillators (8000 in the published experiment) is one LUT configured as
// a <= ~a & en whose output feeds back to its own input: a combinational loop
// that oscillates while en is high and settles to 0 when en is low. Here bit i
// of osc is oscillator i. While its group is enabled an oscillator's node takes
// the value ~a & en once every DELAY picoseconds, so it toggles with period
// 2*DELAY; disabled, it rests at 0. The loop
// delay is an assumed figure. The oscillators of one group start together and
// are modelled by one shared node, which keeps simulation builds fast.
//
// The oscillators are split into GROUPS equal groups, group g enabled by
// grp_en[g] (oscillator i belongs to group i / (N_RO/GROUPS)), so a controller
// can switch the load on step by step and off at once. The grouping is this
// design's choice; the published work only says the ROs are enabled gradually
// and disabled suddenly. osc is brought out so the loops can be observed.
module ro_bank #(
  parameter int unsigned N_RO   = 8000,
  parameter int unsigned GROUPS = 8,
  parameter int unsigned DELAY  = 1000
) (
  input  logic [GROUPS-1:0] grp_en,
  output logic [N_RO-1:0]   osc
);

  localparam int unsigned PER_GROUP = N_RO / GROUPS;

  logic [GROUPS-1:0] node;   // loop node shared by the oscillators of a group

  initial begin
    assert (N_RO % GROUPS == 0) else $error("N_RO must be a multiple of GROUPS");
  end

  // a <= ~a & en, re-evaluated once per loop delay while the group is enabled.
  // All oscillators of a group start together, so they share one node here.
  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    initial node[g] = 1'b0;
    always begin
      if (!grp_en[g]) begin
        node[g] = 1'b0;
        wait (grp_en[g]);
      end
      #(DELAY * 1ps);
      node[g] = ~node[g] & grp_en[g];
    end
  end

  for (genvar i = 0; i < N_RO; i++) begin : g_osc
    assign osc[i] = node[i / PER_GROUP];
  end

endmodule
