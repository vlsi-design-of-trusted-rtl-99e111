// control_unit: the finite state machine that runs the sensor (states
// OFF-ON, CONF1..CONF3, IDLE, TS1..TS6), addresses the NVM, multiplexes the
// shared SRAM ports and enables only the blocks a state needs.
// Configuration mode (after power-up):
//   CONF1  streams NVM words 0..824 (RND mask, ID mask, Helper Data), one per
//          cycle, to the HDA, and reads the matching SRAM start-up word every
//          five words so that the HDA sees 12 start-up bits per mask word.
//   CONF2  waits until the HDA has decoded the last key bit.
//   CONF3  loads the nonce counter with the seed, reads the three PWAR
//          configuration words (number of inputs, p_1..p_4, fixed-point
//          shift) and then the 20,480 parameter words, assembling five of
//          them (f_i0 first) into each 60-bit SRAM word.
// Trusted sensing mode:
//   IDLE -> TS1 on x_valid: four input words, one per cycle; the nonce is
//          advanced in the first cycle and AEGIS starts nonce processing in
//          the second, running in parallel with the PWAR path.
//   TS2 address generation, TS3 SRAM read, TS4 affine function,
//   TS5 ciphertext (as soon as AEGIS has finished the nonce), TS6 tag.
// Interface timing: nvm_data must arrive one clock after nvm_addr; the
// SRAM read data one clock after its address. From the first x_valid to
// out_valid takes 20 clocks with six finalisation rounds; nonce, ct and tag
// are held until the next measurement, out_valid pulses for one clock.
// ae_msg is the 26-bit measurement y zero-extended to one 128-bit AEGIS
// block, so its upper 102 bits are constant 0 and its lower 26 bits are y
// itself; a synthesis tool will see them as constant and pass-through.
// The state sequence and the tasks of each state follow the published
// design; the NVM word map, the overlap of the HDA with the NVM read, the
// input handshake and the output registers are this design's choices.
module control_unit
  import tvs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // NVM
  output logic [NVM_AW-1:0]    nvm_addr,
  input  logic [NVM_W-1:0]     nvm_data,
  // sensor inputs and outputs
  input  logic                 x_valid,
  input  logic [W_IN-1:0]      x_data,
  output logic                 ready,
  output logic                 out_valid,
  output block_t               nonce_o,
  output block_t               ct_o,
  output block_t               tag_o,
  output ctrl_state_e          state,
  // SRAM
  output logic                 sram_re,
  output logic [SRAM_AW-1:0]   sram_raddr,
  output logic                 sram_we,
  output logic [SRAM_AW-1:0]   sram_waddr,
  output logic [SRAM_W-1:0]    sram_wdata,
  // HDA
  output logic                 hda_valid,
  output hda_phase_e           hda_phase,
  output logic [2:0]           hda_slice,
  output logic                 hda_flush,
  input  logic                 hda_id_we,
  input  logic [6:0]           hda_id_waddr_ofs,
  input  logic [SRAM_W-1:0]    hda_id_wdata,
  input  logic                 hda_key_done,
  // nonce counter
  output logic                 nc_load,
  output logic                 nc_inc,
  input  block_t               nonce,
  // address generator and arithmetic block
  output logic                 ag_en,
  output logic [N_IN*W_IN-1:0] x_vec,
  output logic [N_IN*PK_W-1:0] pk,
  input  logic [SRAM_AW-1:0]   ag_addr,
  output logic                 ar_en,
  output logic [2:0]           n_used,
  output logic [3:0]           frac,
  input  logic [W_Y-1:0]       y,
  // AEGIS
  output logic                 ae_start,
  output logic                 ae_msg_valid,
  output block_t               ae_msg,
  input  logic                 ae_ct_valid,
  input  block_t               ae_ct,
  input  logic                 ae_tag_valid,
  input  block_t               ae_tag
);

  typedef enum logic [2:0] {R_RND, R_ID, R_HLP, R_CFG, R_PAR} region_e;

  typedef struct packed {
    logic [NVM_AW-1:0] addr;
    region_e           rgn;
    logic [2:0]        sl;    // slice of the SRAM word (0..4)
    logic [SRAM_AW-1:0] wd;   // SRAM word index inside the region
  } nvm_ptr_t;

  // What the data side needs to know about the word it receives
  typedef struct packed {
    region_e           rgn;
    logic [2:0]        sl;
    logic [SRAM_AW-1:0] wd;
  } nvm_pos_t;

  // Pointer to the next NVM word, one word further
  function automatic nvm_ptr_t advance(input nvm_ptr_t p);
    nvm_ptr_t n;
    n.addr = p.addr + 1'b1;
    n.rgn  = p.rgn;
    n.sl   = (p.sl == 3'(SLICES - 1)) ? 3'd0 : p.sl + 3'd1;
    n.wd   = (p.sl == 3'(SLICES - 1)) ? p.wd + 1'b1 : p.wd;
    if (n.addr == NVM_AW'(NVM_ID_BASE) || n.addr == NVM_AW'(NVM_HLP_BASE) ||
        n.addr == NVM_AW'(NVM_CFG_BASE) || n.addr == NVM_AW'(NVM_PAR_BASE)) begin
      n.rgn = region_e'(p.rgn + 3'd1);
      n.sl  = '0;
      n.wd  = '0;
    end
    return n;
  endfunction

  nvm_ptr_t    iss;               // issued word
  nvm_pos_t    dat;               // word whose data is present
  logic        iss_v, dat_v;
  logic [47:0] par_buf;
  logic [W_IN-1:0] x_reg [N_IN];
  logic [1:0]  xcnt;
  logic        ae_started;
  logic        conf3_go;

  assign nvm_addr = iss.addr;
  assign ready    = (state == ST_IDLE);

  // HDA stream
  always_comb begin
    hda_valid = dat_v && (dat.rgn == R_RND || dat.rgn == R_ID || dat.rgn == R_HLP);
    unique case (dat.rgn)
      R_ID:    hda_phase = PH_ID;
      R_HLP:   hda_phase = PH_HLP;
      default: hda_phase = PH_RND;
    endcase
    hda_slice = dat.sl;
    hda_flush = dat_v && dat.rgn == R_ID && dat.wd == SRAM_AW'(ID_WORDS - 1) &&
                dat.sl == 3'(SLICES - 1);
  end

  // SRAM address multiplexer: HDA start-up reads, Address Generator,
  // HDA ID buffer writes, PWAR parameter writes
  always_comb begin
    sram_re    = 1'b0;
    sram_raddr = ag_addr;
    if (state == ST_TS3) begin
      sram_re = 1'b1;
    end else if (iss_v && iss.sl == 3'd0) begin
      unique case (iss.rgn)
        R_RND: begin sram_re = 1'b1; sram_raddr = SRAM_AW'(SRAM_RND_BASE)   + iss.wd; end
        R_ID:  begin sram_re = 1'b1; sram_raddr = SRAM_AW'(SRAM_ID_BASE)    + iss.wd; end
        R_HLP: begin sram_re = 1'b1; sram_raddr = SRAM_AW'(SRAM_IDBUF_BASE) + iss.wd; end
        default: ;
      endcase
    end
    if (hda_id_we) begin
      sram_we    = 1'b1;
      sram_waddr = SRAM_AW'(SRAM_IDBUF_BASE) + SRAM_AW'(hda_id_waddr_ofs);
      sram_wdata = hda_id_wdata;
    end else begin
      sram_we    = dat_v && dat.rgn == R_PAR && dat.sl == 3'(SLICES - 1);
      sram_waddr = dat.wd;
      sram_wdata = {nvm_data, par_buf};
    end
  end

  // Enables
  always_comb begin
    conf3_go     = (state == ST_CONF2) && hda_key_done && !dat_v;
    nc_load      = conf3_go;
    nc_inc       = (state == ST_IDLE) && x_valid;
    ae_start     = (state == ST_TS1) && !ae_started;
    ag_en        = (state == ST_TS2);
    ar_en        = (state == ST_TS4);
    ae_msg_valid = (state == ST_TS5);
    ae_msg       = block_t'(y);
    for (int k = 0; k < N_IN; k++)
      x_vec[(N_IN-1-k)*W_IN +: W_IN] = x_reg[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_OFF_ON;
      iss        <= '{addr: '0, rgn: R_RND, sl: '0, wd: '0};
      dat        <= '{rgn: R_RND, sl: '0, wd: '0};
      iss_v      <= 1'b0;
      dat_v      <= 1'b0;
      par_buf    <= '0;
      n_used     <= '0;
      pk         <= '0;
      frac       <= '0;
      for (int k = 0; k < N_IN; k++) x_reg[k] <= '0;
      xcnt       <= '0;
      ae_started <= 1'b0;
      out_valid  <= 1'b0;
      nonce_o    <= '0;
      ct_o       <= '0;
      tag_o      <= '0;
    end else begin
      out_valid <= 1'b0;
      // NVM pipeline: issue side and data side
      dat   <= '{rgn: iss.rgn, sl: iss.sl, wd: iss.wd};
      dat_v <= iss_v;
      if (iss_v) begin
        if (iss.addr == NVM_AW'(NVM_CFG_BASE - 1) || iss.addr == NVM_AW'(NVM_WORDS - 1))
          iss_v <= 1'b0;
        else
          iss <= advance(iss);
      end
      // Data side: PWAR configuration and parameters
      if (dat_v && dat.rgn == R_CFG) begin
        unique case (dat.sl)
          3'd0:    n_used <= nvm_data[2:0];
          3'd1:    pk     <= nvm_data[N_IN*PK_W-1:0];
          default: frac   <= nvm_data[3:0];
        endcase
      end
      if (dat_v && dat.rgn == R_PAR && dat.sl != 3'(SLICES - 1))
        par_buf[W_IN*dat.sl +: W_IN] <= nvm_data;

      unique case (state)
        ST_OFF_ON: begin
          state <= ST_CONF1;
          iss_v <= 1'b1;
        end
        ST_CONF1: if (iss_v && iss.addr == NVM_AW'(NVM_CFG_BASE - 1)) state <= ST_CONF2;
        ST_CONF2: if (conf3_go) begin
          state <= ST_CONF3;
          iss   <= advance(iss);
          iss_v <= 1'b1;
        end
        ST_CONF3: if (!iss_v && !dat_v) state <= ST_IDLE;
        ST_IDLE: if (x_valid) begin
          x_reg[0]   <= x_data;
          xcnt       <= 2'd1;
          ae_started <= 1'b0;
          state      <= ST_TS1;
        end
        ST_TS1: begin
          if (!ae_started) begin
            ae_started <= 1'b1;
            nonce_o    <= nonce;
          end
          if (x_valid) begin
            x_reg[xcnt] <= x_data;
            xcnt        <= xcnt + 2'd1;
            if (xcnt == 2'(N_IN - 1)) state <= ST_TS2;
          end
        end
        ST_TS2: state <= ST_TS3;
        ST_TS3: state <= ST_TS4;
        ST_TS4: state <= ST_TS5;
        ST_TS5: if (ae_ct_valid) begin
          ct_o  <= ae_ct;
          state <= ST_TS6;
        end
        ST_TS6: if (ae_tag_valid) begin
          tag_o     <= ae_tag;
          out_valid <= 1'b1;
          state     <= ST_IDLE;
        end
        default: state <= ST_OFF_ON;
      endcase
    end
  end

endmodule
