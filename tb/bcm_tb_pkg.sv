// bcm_tb_pkg: reference models shared by the BCM testbenches. They are
// written independently of the RTL: the pulse model walks the sample bit by
// bit and lists the pulses in time order instead of searching edge vectors.
package bcm_tb_pkg;
  import bcm_pkg::*;

  typedef struct {
    int n;              // number of rising edges (pulses) in the sample
    int pos[64];
    int fin[64];        // index of the first 0 after the pulse, 64 if none
  } pulse_list_t;

  function automatic pulse_list_t list_pulses(input logic [63:0] raw);
    pulse_list_t l;
    bit in_p;
    l.n = 0;
    in_p = 0;
    for (int i = 1; i < 64; i++) begin
      if (raw[i] && !raw[i-1]) begin
        l.pos[l.n] = i;
        l.fin[l.n] = 64;
        l.n++;
        in_p = 1;
      end else if (!raw[i] && raw[i-1] && in_p) begin
        l.fin[l.n-1] = i;
        in_p = 0;
      end
    end
    return l;
  endfunction

  function automatic chan_pulses_t ref_pulses(input logic [63:0] raw);
    chan_pulses_t r;
    pulse_list_t l;
    int w;
    l = list_pulses(raw);
    r = '0;
    if (l.n >= 1) begin
      w = l.fin[0] - l.pos[0];
      r.p1.valid = 1'b1;
      r.p1.pos   = 6'(l.pos[0]);
      r.p1.width = 5'((w > 31) ? 31 : w);
    end
    if (l.n >= 2) begin
      w = l.fin[l.n-1] - l.pos[l.n-1];
      r.p2.valid = 1'b1;
      r.p2.pos   = 6'(l.pos[l.n-1]);
      r.p2.width = 5'((w > 31) ? 31 : w);
    end
    return r;
  endfunction

  function automatic int ref_hits(input logic [63:0] raw);
    pulse_list_t l;
    l = list_pulses(raw);
    return l.n;
  endfunction

  // a sample made of 0..3 runs of ones at random places
  function automatic logic [63:0] rand_sample();
    logic [63:0] s;
    int np, st, ln;
    s = '0;
    np = $urandom_range(0, 3);
    for (int k = 0; k < np; k++) begin
      st = $urandom_range(0, 63);
      ln = $urandom_range(1, 40);
      for (int i = st; i < st + ln && i < 64; i++) s[i] = 1'b1;
    end
    if ($urandom_range(0, 7) == 0) s = {$urandom, $urandom};
    return s;
  endfunction
endpackage
