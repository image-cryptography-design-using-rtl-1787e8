// control_unit: sequencer of a byte-serial AES-128 core.
//
// A small FSM (phase, 5-bit cycle counter, 4-bit round counter) drives the
// control word ctrl_t of aes_pkg: the operation and the clock enable of the
// state register, the Mix-Columns registers, the key register and the RCON
// register, the mux settings of the shared S-box and the key feedback.
// Every register bank is clock-gated off in the cycles where it has no work,
// in particular the state register and Mix-Columns during key expansion.
//
// Schedule of one block (both cores; done is set by the 490th edge after the
// load edge):
//   load (1) - AddRoundKey (16) - 9 x [key expansion (16), (Inv)ShiftRows (1),
//   Mix-Columns pass (32)] - key expansion (16), (Inv)ShiftRows (1),
//   final pass (16); done rises on the last edge.
// In a Mix-Columns pass each column takes 8 cycles: 4 to stream its bytes
// through the S-box into the Mix-Columns registers, 4 to stream the results
// back into the state register.
//
// INVERSE = 0 (encrypter): a rising edge of ld loads key and plain text and
//   starts; kld is unused. The key is expanded forward, one round key ahead
//   of each round.
// INVERSE = 1 (decrypter): a rising edge of kld loads the key and runs ten
//   forward expansions (160 cycles) to reach the last round key; a rising
//   edge of ld (seen at any time, kept pending until the key is ready) then
//   loads the cipher text and decrypts, running the key schedule backwards.
//   When a block is done the key register is back at the cipher key and the
//   forward expansion is rerun, so the next ld needs no new kld.
// done is a level: set at the end of a block, cleared by the next start
// (and, in the decrypter, by a key load).
//
// Interface: clk (core clock), rst (asynchronous, active high), ld, kld in;
// ctrl, done, phase out. The control word is combinational from the FSM
// state and the load edges, valid for the coming edge of clk.
module control_unit
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   ld,
  input  logic   kld,
  output ctrl_t  ctrl,
  output logic   done,
  output phase_e phase
);
  logic [4:0] cnt;
  logic [3:0] round;
  logic       ld_q, kld_q, pend;
  logic       ld_edge, kld_edge, start;
  logic       last_ke;

  assign ld_edge  = ld & ~ld_q;
  assign kld_edge = INVERSE ? (kld & ~kld_q) : 1'b0;
  // Data start: at the load edge (encrypter), or when the key is ready (decrypter).
  assign start    = INVERSE ? (phase == PH_READY && (pend || ld_edge)) : ld_edge;
  assign last_ke  = (round == 4'(NR));

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      round <= '0;
      ld_q  <= 1'b0;
      kld_q <= 1'b0;
      pend  <= 1'b0;
      done  <= 1'b0;
    end else begin
      ld_q  <= ld;
      kld_q <= kld;
      if (INVERSE && ld_edge && phase != PH_READY) pend <= 1'b1;
      if (kld_edge) begin
        phase <= PH_PRE;
        cnt   <= '0;
        round <= 4'd1;
        done  <= 1'b0;
      end else if (start) begin
        phase <= PH_ARK;
        cnt   <= '0;
        pend  <= 1'b0;
        done  <= 1'b0;
      end else begin
        unique case (phase)
          PH_PRE: begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd15) begin
              cnt <= '0;
              if (last_ke) phase <= PH_READY;
              else round <= round + 4'd1;
            end
          end
          PH_ARK: begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd15) begin
              phase <= PH_KE;
              cnt   <= '0;
              round <= 4'd1;
            end
          end
          PH_KE: begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd15) begin
              phase <= PH_PERM;
              cnt   <= '0;
            end
          end
          PH_PERM: phase <= last_ke ? PH_FIN : PH_MIX;
          PH_MIX: begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd31) begin
              phase <= PH_KE;
              cnt   <= '0;
              round <= round + 4'd1;
            end
          end
          PH_FIN: begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'd15) begin
              done  <= 1'b1;
              cnt   <= '0;
              round <= 4'd1;
              phase <= INVERSE ? PH_PRE : PH_IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- control word ----------------
  always_comb begin
    ctrl          = '0;
    ctrl.st_op    = ST_HOLD;
    ctrl.st_din   = SD_ARK;
    ctrl.key_op   = K_HOLD;
    ctrl.key_din  = KD_ROT;
    ctrl.key_tap  = T13;
    ctrl.rcon_op  = RC_HOLD;
    ctrl.key_dir  = INVERSE && phase != PH_PRE && !kld_edge;
    ctrl.mc_load  = ~cnt[2];

    if (kld_edge || (!INVERSE && start)) begin
      // load the cipher key (and, in the encrypter, the plain text)
      ctrl.key_en  = 1'b1;
      ctrl.key_op  = K_LOAD;
      ctrl.rcon_en = 1'b1;
      ctrl.rcon_op = RC_INIT;
      if (!INVERSE) begin
        ctrl.st_en = 1'b1;
        ctrl.st_op = ST_LOAD;
      end
    end else if (start) begin
      // decrypter: load the cipher text, key already at the last round key
      ctrl.st_en = 1'b1;
      ctrl.st_op = ST_LOAD;
    end else begin
      unique case (phase)
        PH_ARK: begin
          ctrl.st_en   = 1'b1;
          ctrl.st_op   = ST_SHIFT;
          ctrl.st_din  = SD_ARK;
          ctrl.key_en  = 1'b1;
          ctrl.key_op  = K_SHIFT;
        end
        PH_PRE, PH_KE: begin
          ctrl.key_en   = 1'b1;
          ctrl.key_op   = K_SHIFT;
          if (!ctrl.key_dir) begin
            // forward: bytes 0..3 use SubWord(RotWord(last word)) and RCON
            ctrl.key_din  = (cnt < 5'd4) ? KD_SBOX : KD_PREV;
            ctrl.key_tap  = (cnt == 5'd3) ? T9 : T13;
            ctrl.sbox_key = (cnt < 5'd4);
            ctrl.rcon_use = (cnt == 5'd0);
            ctrl.rcon_en  = (cnt == 5'd0);
            ctrl.rcon_op  = RC_FWD;
          end else begin
            // inverse: bytes 15..4 first, then 3..0 from the recovered last word
            ctrl.key_din  = (cnt < 5'd12) ? KD_PREV : KD_SBOX;
            ctrl.key_tap  = (cnt == 5'd12) ? T8 : T12;
            ctrl.sbox_key = (cnt >= 5'd12);
            ctrl.rcon_use = (cnt == 5'd15);
            ctrl.rcon_en  = (cnt == 5'd0);
            ctrl.rcon_op  = RC_BACK;
          end
        end
        PH_PERM: begin
          ctrl.st_en = 1'b1;
          ctrl.st_op = ST_PERM;
        end
        PH_MIX: begin
          ctrl.st_en = 1'b1;
          ctrl.mc_en = 1'b1;
          if (!cnt[2]) begin
            // bytes of one column leave the state into Mix-Columns
            ctrl.st_op = ST_SHIFT;
            if (INVERSE) begin
              ctrl.key_en = 1'b1;      // AddRoundKey comes before InvMixColumns
              ctrl.key_op = K_SHIFT;
            end
          end else begin
            // result bytes enter the vacated slots
            ctrl.st_op  = ST_TAIL;
            ctrl.st_din = SD_MC;
            if (!INVERSE) begin
              ctrl.key_en = 1'b1;      // AddRoundKey comes after MixColumns
              ctrl.key_op = K_SHIFT;
            end
          end
        end
        PH_FIN: begin
          ctrl.st_en  = 1'b1;
          ctrl.st_op  = ST_SHIFT;
          ctrl.st_din = SD_SBK;
          ctrl.key_en = 1'b1;
          ctrl.key_op = K_SHIFT;
        end
        default: ;
      endcase
    end
    ctrl.sbox_inv = INVERSE && !ctrl.sbox_key;
  end

  // Rules of the schedule: no state or Mix-Columns clock during key
  // expansion, and the shared S-box serves one user at a time.
  a_ke_gated: assert property (@(posedge clk) disable iff (rst)
    (phase == PH_KE || phase == PH_PRE) && !kld_edge && !start |-> !ctrl.st_en && !ctrl.mc_en);
  a_sbox_shared: assert property (@(posedge clk) disable iff (rst)
    ctrl.sbox_key |-> !ctrl.st_en);
endmodule
