// sran -- Special Resource Arbitration Network: a crossbar that connects task
// processing units (TPUs) to the shared peripheral processors and VLSI units
// (PPVUs), and PPVUs to one another.
//
// There are N_SRC = N_TPU + N_PPVU sources: sources 0..N_TPU-1 are the TPUs,
// source N_TPU+k is PPVU k (for PPVU-to-PPVU paths). A source asks for PPVU
// dst[s] by holding req[s]. Each PPVU has an owner register: when the PPVU is
// free, the requesting source with the lowest number wins it (so TPUs come
// before PPVUs), and it keeps the PPVU, circuit-switched, for as long as it
// holds req with the same dst; dropping req or changing dst releases it at the
// next clock. A PPVU never connects to itself. While granted, the owner's
// wdata appears on the PPVU's input (ppvu_in_valid high) and the PPVU's output
// comes back on the owner's rdata. grant rises one cycle after req.
// A crossbar between any TPU and any PPVU, inter-PPVU paths and priority
// resolution of conflicts follow the design; the sizes, the fixed-priority
// rule, holding a path for the whole request and the data widths are this
// design's choices.
module sran #(
  parameter int unsigned N_TPU  = 4,
  parameter int unsigned N_PPVU = 4,
  parameter int unsigned DW     = 16,
  localparam int unsigned N_SRC = N_TPU + N_PPVU,
  localparam int unsigned PW    = (N_PPVU > 1) ? $clog2(N_PPVU) : 1,
  localparam int unsigned SW    = $clog2(N_SRC)
) (
  input  logic              clk,
  input  logic              rst_n,
  // sources (TPUs, then PPVUs as requesters)
  input  logic [N_SRC-1:0]  req,
  input  logic [PW-1:0]     dst   [N_SRC],
  input  logic [DW-1:0]     wdata [N_SRC],
  output logic [N_SRC-1:0]  grant,
  output logic [DW-1:0]     rdata [N_SRC],
  // PPVU side
  output logic [N_PPVU-1:0] ppvu_in_valid,
  output logic [DW-1:0]     ppvu_in_data  [N_PPVU],
  input  logic [DW-1:0]     ppvu_out_data [N_PPVU],
  output logic [N_PPVU-1:0] ppvu_conflict   // more than one source waited this cycle
);

  logic [N_PPVU-1:0] busy_q;
  logic [SW-1:0]     owner_q [N_PPVU];

  // wants[k][s]: source s asks for PPVU k
  logic [N_SRC-1:0]  wants [N_PPVU];

  always_comb begin
    for (int k = 0; k < N_PPVU; k++)
      for (int s = 0; s < N_SRC; s++)
        wants[k][s] = req[s] && (dst[s] == PW'(k)) && (s != N_TPU + k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= '0;
      for (int k = 0; k < N_PPVU; k++) owner_q[k] <= '0;
    end else begin
      for (int k = 0; k < N_PPVU; k++) begin
        if (busy_q[k] && !wants[k][owner_q[k]]) begin
          busy_q[k] <= 1'b0;                     // owner released it
        end else if (!busy_q[k] && |wants[k]) begin
          busy_q[k] <= 1'b1;
          for (int s = N_SRC - 1; s >= 0; s--)   // lowest number wins
            if (wants[k][s]) owner_q[k] <= SW'(s);
        end
      end
    end
  end

  always_comb begin
    grant = '0;
    for (int s = 0; s < N_SRC; s++) rdata[s] = '0;
    for (int k = 0; k < N_PPVU; k++) begin
      ppvu_in_valid[k] = busy_q[k] && wants[k][owner_q[k]];
      ppvu_in_data[k]  = ppvu_in_valid[k] ? wdata[owner_q[k]] : '0;
      ppvu_conflict[k] = busy_q[k] ? ((wants[k] & ~(N_SRC'(1) << owner_q[k])) != '0)
                                   : ((wants[k] & (wants[k] - 1'b1)) != '0);
      if (ppvu_in_valid[k]) begin
        grant[owner_q[k]] = 1'b1;
        rdata[owner_q[k]] = ppvu_out_data[k];
      end
    end
  end

  // A source may hold at most one PPVU, and only while it asks for it.
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~req) == '0) else $error("sran: grant without request");

endmodule
