// hasprng_host_pkg: software model of the host processor's side of the
// verification platform, shared by the platform testbenches.
//
// host_model seeds a stream for any of the five generators (random stream
// constants and initial states, returned as the configuration record and the
// list of words to load) and then produces the reference numbers, already cut
// to the 32 captured bits, by evaluating each recurrence one step at a time
// with plain integer arithmetic (% for the prime moduli). It does not use the
// look-ahead form of the hardware, apart from computing a^8 and
// p*(a^7+...+1), which the host has to supply.
package hasprng_host_pkg;
  import hasprng_pkg::*;

  localparam longint unsigned REF_M31 = 64'h7FFF_FFFF;
  localparam logic [127:0]    REF_M61 = (128'd1 << 61) - 1;

  // One load for the platform's seeding port.
  typedef struct {
    bit          sel;     // CMRG half: 0 LCG states, 1 lag states
    logic [63:0] data;
  } load_t;

  class host_model;
    int unsigned     lag_l, lag_k;
    longint unsigned ra, rp, rx, rmask;   // LCG and CMRG X half
    longint unsigned ry[$];               // CMRG lag history
    longint unsigned rz[$];               // MLFG history
    logic [127:0]    rpz, rpa;            // PMLCG state and multiplier

    function new(int unsigned l, int unsigned k);
      lag_l = l;
      lag_k = k;
    endfunction

    // New random stream for generator g: updates cfg and fills loads.
    function void new_stream(gen_sel_e g, ref gen_cfg_t cfg, ref load_t loads[$]);
      longint unsigned ap, ps;
      loads.delete();
      unique case (g)
        GEN_LCG48, GEN_LCG64, GEN_CMRG: begin
          rmask = (g == GEN_LCG48) ? 64'hFFFF_FFFF_FFFF : 64'hFFFF_FFFF_FFFF_FFFF;
          ra = {$urandom, $urandom} & rmask;
          rp = ({$urandom, $urandom} | 64'd1) & rmask;
          rx = {$urandom, $urandom} & rmask;
          ap = 1; ps = 0;
          for (int i = 0; i < 8; i++) begin ps += ap; ap *= ra; end
          if (g == GEN_LCG48) begin
            cfg.lcg48_a8 = 48'(ap); cfg.lcg48_p8 = 48'(rp * ps);
          end else if (g == GEN_LCG64) begin
            cfg.lcg64_a8 = ap; cfg.lcg64_p8 = rp * ps;
          end else begin
            cfg.cmrg_a8 = ap; cfg.cmrg_p8 = rp * ps;
          end
          // States X(0)..X(7); rx ends at X(7).
          for (int i = 0; i < 8; i++) begin
            if (i > 0) rx = (ra * rx + rp) & rmask;
            loads.push_back('{1'b0, rx});
          end
          if (g == GEN_CMRG) begin
            ry.delete();
            for (int i = 0; i < 5; i++) begin
              ry.push_back(64'($urandom_range(1, 32'h7FFF_FFFE)));
              loads.push_back('{1'b1, ry[$]});
            end
          end
        end
        GEN_MLFG: begin
          rz.delete();
          for (int i = 0; i < lag_l; i++) begin
            rz.push_back({$urandom, $urandom} | 64'd1);
            loads.push_back('{1'b0, rz[$]});
          end
        end
        default: begin
          rpa = 128'({$urandom, $urandom}) % REF_M61;
          cfg.pmlcg_a = 61'(rpa);
          rpz = 128'({$urandom, $urandom}) % (REF_M61 - 1) + 1;
          loads.push_back('{1'b0, 64'(rpz)});
        end
      endcase
    endfunction

    // Next reference number of generator g, most significant 32 bits.
    function logic [31:0] next(gen_sel_e g);
      longint unsigned yn, e;
      unique case (g)
        GEN_LCG48: begin rx = (ra * rx + rp) & rmask; return rx[47:16]; end
        GEN_LCG64: begin rx = ra * rx + rp;           return rx[63:32]; end
        GEN_CMRG: begin
          rx = ra * rx + rp;
          yn = (64'd107374182 * ry[$] + 64'd104480 * ry[$-4]) % REF_M31;
          ry.push_back(yn);
          void'(ry.pop_front());
          e = rx + (yn << 32);
          return e[63:32];
        end
        GEN_MLFG: begin
          e = rz[rz.size() - lag_k] * rz[rz.size() - lag_l];
          rz.push_back(e);
          void'(rz.pop_front());
          return e[63:32];
        end
        default: begin
          rpz = (((rpa * rpz) % REF_M61) << 32) % REF_M61;
          return rpz[60:29];
        end
      endcase
    endfunction
  endclass

endpackage
