// tw_ref_pkg -- reference arithmetic for the testbenches of the time-window
// network, written from the number format alone (not from the RTL).
//
//   product magnitude  : round(a*b/15), computed as (2ab + 15) div 30
//   product sign       : sa xor sb
//   symmetric pulse    : the pulse at time unit t is 1 when round((t+1)*b/15)
//                        exceeds round(t*b/15)
//   neuron activity    : signed sum of the products, clipped to [-15, +15]
package tw_ref_pkg;
  import tw_pkg::*;

  function automatic int rprod(int a, int b);
    return (2 * a * b + WIN_LEN) / (2 * WIN_LEN);
  endfunction

  function automatic bit sym_pulse(int b, int t);
    return rprod(t + 1, b) != rprod(t, b);
  endfunction

  function automatic int sprod(tw_num_t x, tw_num_t w);
    int p = rprod(int'(x.m), int'(w.m));
    return (x.s ^ w.s) ? -p : p;
  endfunction

  function automatic tw_num_t sat(int pot);
    tw_num_t r;
    if (pot > int'(WIN_LEN))       pot = WIN_LEN;
    if (pot < -int'(WIN_LEN))      pot = -int'(WIN_LEN);
    r.s = (pot < 0);
    r.m = mag_t'(pot < 0 ? -pot : pot);
    return r;
  endfunction

  function automatic tw_num_t rand_num(int max_m);
    tw_num_t r;
    r.s = 1'($urandom_range(0, 1));
    r.m = mag_t'($urandom_range(0, max_m));
    return r;
  endfunction
endpackage
