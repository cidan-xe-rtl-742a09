// npe: neuron processing element, four artificial neurons with local
// registers and routing muxes.
//
// Each neuron n has four routing muxes (inputs a, b, c, d), one threshold
// gate [1,1,1,2;T] and a 16-bit local register. A mux can pick a constant,
// the neuron's own output, nine neighbour lines or any bit of the neuron's
// own register. Neighbour lines 0..2 of neuron n are the outputs of neurons
// (n+1), (n+2), (n+3) mod 4 of this NPE, so the four neurons are fully
// connected; lines 3..8 are nbr_ext[0..5], outputs of the adjacent NPEs of the
// array. All NPEs of an array receive the same control word, one per clock.
//
// Operands arrive four bits at a time from the NPE's four bitlines (ld):
// the nibble is written into the same slot of all four registers, so every
// neuron holds its own copy of X, Y and Z. Results leave on bl_out, either
// the four neuron outputs (bit k from neuron k) or one register nibble.
//
// Timing: neuron outputs and registers change on the clock edge; bl_out is
// combinational from them. From the source design: four fully connected
// neurons, a 16-bit register each, 28-source muxes with a 5-bit select and
// four bitlines per NPE. The broadcast load, the neighbour numbering and the
// write-back selection are this design's own.
module npe
  import cidan_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  npe_ctrl_t           ctrl,
  input  logic                ld,
  input  logic [1:0]          ld_slot,
  input  logic [3:0]          bl_in,
  input  logic [NBR_EXT-1:0]  nbr_ext,
  input  wb_sel_t             wb,
  output logic [NEURONS-1:0]  q,
  output logic [3:0]          bl_out
);

  logic [NEURONS-1:0][REG_BITS-1:0]  r;
  logic [NEURONS-1:0][AN_INPUTS-1:0] x;
  logic [NEURONS-1:0][NBR_BITS-1:0]  nbr;

  for (genvar n = 0; n < NEURONS; n++) begin : g_an
    always_comb begin
      for (int i = 0; i < NEURONS-1; i++)
        nbr[n][i] = q[(n + 1 + i) % NEURONS];
      nbr[n][NBR_BITS-1:NEURONS-1] = nbr_ext;
    end

    for (genvar i = 0; i < AN_INPUTS; i++) begin : g_in
      routing_mux u_mux (
        .sel  (ctrl[n].sel[i]),
        .inv  (ctrl[n].inv[i]),
        .fb   (q[n]),
        .nbr  (nbr[n]),
        .rbus (r[n]),
        .y    (x[n][i])
      );
    end

    artificial_neuron u_an (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (ctrl[n].en),
      .x     (x[n]),
      .thr   (ctrl[n].thr),
      .q     (q[n])
    );

    local_register u_reg (
      .clk     (clk),
      .rst_n   (rst_n),
      .ld      (ld),
      .ld_slot (ld_slot),
      .bl      (bl_in),
      .rop     (ctrl[n].rop),
      .raddr   (ctrl[n].raddr),
      .q       (q[n]),
      .r       (r[n])
    );
  end

  always_comb begin
    if (wb.src == WB_Q) bl_out = q;
    else                bl_out = r[wb.an][{wb.slot, 2'b00} +: 4];
  end

endmodule
